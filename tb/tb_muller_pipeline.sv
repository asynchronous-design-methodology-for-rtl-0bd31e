// tb_muller_pipeline: self-checking test of the three-stage Muller pipeline.
// A sender toggles req_in (4-phase) whenever ack_in equals req_in, a receiver
// copies req_out to ack_out after a random delay. Every tick the stage states
// are compared with a reference model of C[i] = C(C[i-1], ~C[i+1]); the test
// also counts complete handshakes at both ends, which must match.
module tb_muller_pipeline;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_in = 1'b0, ack_out = 1'b0;
  logic ack_in, req_out;
  logic [N-1:0] stage, sref;
  int checks = 0, failures = 0, sent = 0, recv = 0;

  muller_pipeline #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req_in(req_in), .ack_in(ack_in),
                                .req_out(req_out), .ack_out(ack_out), .stage(stage));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, evaluated on the same edge with the pre-edge values
  always @(posedge clk) begin
    logic [N-1:0] nxt;
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        logic p, s;
        p = (i == 0) ? req_in : sref[i-1];
        s = (i == N-1) ? ack_out : sref[i+1];
        nxt[i] = (p == ~s) ? p : sref[i];
      end
      sref <= nxt;
    end
  end

  initial begin
    sref = '0;
    repeat (2) @(negedge clk);
    checks++; if (stage !== '0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      checks++;
      if (stage !== sref) begin
        failures++;
        $display("t=%0d stage=%b exp=%b", t, stage, sref);
      end
      // sender: next transition once acknowledged
      if (ack_in == req_in && $urandom_range(0, 2) != 0) begin
        if (!req_in) sent++;
        req_in = ~req_in;
      end
      // receiver
      if (ack_out != req_out && $urandom_range(0, 3) == 0) begin
        if (req_out) recv++;
        ack_out = req_out;
      end
    end
    checks++; if (sent < 50) failures++;
    checks++; if (recv < sent - N || recv > sent) failures++;
    $display("sent=%0d received=%0d", sent, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
