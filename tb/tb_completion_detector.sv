// tb_completion_detector: self-checking test of the dual-rail completion
// detector at its default width of 32 bits.
// Each round fills the word with valid bits one random bit at a time, then
// empties it the same way. done must stay low until the last bit is valid and
// rise on the $clog2(W)-th rising clock edge after it, then stay high until the last bit is
// empty and fall on the $clog2(W)-th edge after that.
module tb_completion_detector;
  import dr_pkg::*;
  localparam int W = 32;
  localparam int LAT = $clog2(W);
  logic clk = 1'b0, rst_n = 1'b0;
  dr_bit_t [W-1:0] d;
  logic done;
  int checks = 0, failures = 0;

  completion_detector #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (done !== exp) begin
      failures++;
      $display("%s: done=%0b expected %0b", what, done, exp);
    end
  endtask

  initial begin
    int order[W];
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (LAT + 1) @(negedge clk);
    check(1'b0, "after reset");
    for (int r = 0; r < 40; r++) begin
      for (int i = 0; i < W; i++) order[i] = i;
      order.shuffle();
      // fill
      for (int i = 0; i < W; i++) begin
        d[order[i]] = dr_encode(1'($urandom_range(0, 1)));
        @(negedge clk);
        if (i < W - 1) check(1'b0, "partially valid");
      end
      for (int k = 1; k < LAT - 1; k++) begin
        @(negedge clk);
        check(1'b0, "tree latency (rise)");
      end
      @(negedge clk);
      check(1'b1, "all valid");
      // drain
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        d[order[i]] = DR_EMPTY;
        @(negedge clk);
        if (i < W - 1) check(1'b1, "partially empty");
      end
      for (int k = 1; k < LAT - 1; k++) begin
        @(negedge clk);
        check(1'b1, "tree latency (fall)");
      end
      @(negedge clk);
      check(1'b0, "all empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
