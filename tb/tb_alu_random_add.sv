// tb_alu_random_add: 1000 additions of uniformly random 32-bit operands
// through the self-timed ALU at its default width, one after the other with
// an immediate receiver. Each sum and carry is checked, each request-to-result
// time is checked against the carry-settling prediction (1 + L + log2(W)
// rising edges from the start of evaluation), and the best, worst and mean
// times are printed: they show how the data-dependent carry ripple spreads
// the completion time of typical additions.
module tb_alu_random_add;
  import dr_pkg::*;
  localparam int W = 32;
  localparam int LOGW = $clog2(W);
  localparam int NSAMP = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_in = 1'b0, ack_out = 1'b0;
  logic [W-1:0] a = '0, b = '0, result;
  logic ack_in, req_out, cout, eval, proto_err;
  dr_bit_t cout_dr;
  int checks = 0, failures = 0;
  int lmin = 1 << 30, lmax = 0, lsum = 0;

  async_alu32 dut (
    .clk(clk), .rst_n(rst_n), .req_in(req_in), .ack_in(ack_in), .op(OP_ADD), .a(a), .b(b),
    .c_flag(1'b0), .req_out(req_out), .ack_out(ack_out), .result(result), .cout(cout),
    .cout_dr(cout_dr), .eval(eval), .proto_err(proto_err)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP * 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int settle(input logic [W-1:0] x, y);
    int t = 0, l = 0;
    for (int i = 0; i < W; i++) begin
      t = (x[i] ^ y[i]) ? t + 1 : 1;
      if (t > l) l = t;
    end
    return l;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      logic [W:0] sum;
      int lat;
      @(negedge clk);
      a = $urandom; b = $urandom;
      sum = {1'b0, a} + {1'b0, b};
      req_in = 1'b1;
      #1;
      while (!eval) begin @(posedge clk); #1; end
      lat = 1;
      while (!req_out) begin @(posedge clk); lat++; #1; end
      checks++;
      if ({cout, result} !== sum) begin
        failures++;
        $display("%h + %h = %h expected %h", a, b, {cout, result}, sum);
      end
      checks++;
      if (lat != 1 + settle(a, b) + LOGW) failures++;
      if (lat < lmin) lmin = lat;
      if (lat > lmax) lmax = lat;
      lsum += lat;
      @(negedge clk);
      ack_out = 1'b1;
      while (!ack_in) @(negedge clk);
      req_in = 1'b0;
      while (req_out) @(negedge clk);
      ack_out = 1'b0;
      while (ack_in) @(negedge clk);
    end
    checks++; if (proto_err) failures++;
    $display("random additions: %0d, request-to-result ticks best=%0d worst=%0d mean=%0.2f",
             NSAMP, lmin, lmax, real'(lsum) / NSAMP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
