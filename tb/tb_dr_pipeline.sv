// tb_dr_pipeline: self-checking test of the 4-phase dual-rail pipeline with
// its default size (one bit, three stages) and with a 4-bit word.
// For each instance a sender pushes random words separated by empty spacers,
// following ack_in, and a receiver acknowledges valid and empty outputs after
// random delays. The received words must equal the sent ones in order, each
// output bit must move only between empty and valid, and the pipeline must
// fill: at some time it holds more than one word.
module tb_dr_pipeline;
  import dr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- default instance: W = 1, N = 3 ----
  dr_bit_t [0:0] d1_in, d1_out;
  logic a1_in, a1_out;
  dr_pipeline u1 (.clk(clk), .rst_n(rst_n), .d_in(d1_in), .ack_in(a1_in),
                  .d_out(d1_out), .ack_out(a1_out));

  // ---- wide instance: W = 4, N = 3 ----
  dr_bit_t [3:0] d4_in, d4_out;
  logic a4_in, a4_out;
  dr_pipeline #(.W(4), .N(3)) u4 (.clk(clk), .rst_n(rst_n), .d_in(d4_in), .ack_in(a4_in),
                                  .d_out(d4_out), .ack_out(a4_out));

  localparam int NWORDS = 200;
  logic [3:0] sent1 [NWORDS], sent4 [NWORDS];
  int nrecv1 = 0, nrecv4 = 0, nsent1 = 0, nsent4 = 0, maxocc1 = 0, maxocc4 = 0;
  bit done1 = 0, done4 = 0;

  function automatic dr_bit_t [3:0] enc4(input logic [3:0] v);
    dr_bit_t [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = dr_encode(v[i]);
    return r;
  endfunction

  function automatic logic all_valid(input dr_bit_t [3:0] v, input int w);
    for (int i = 0; i < w; i++) if (!dr_is_valid(v[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [3:0] dec4(input dr_bit_t [3:0] v);
    logic [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = v[i].t;
    return r;
  endfunction

  // senders
  initial begin
    d1_in = '0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < NWORDS; n++) begin
      sent1[n] = 4'($urandom_range(0, 1));
      d1_in = dr_encode(sent1[n][0]);
      nsent1++;
      while (!a1_in) @(negedge clk);
      d1_in = '0;
      while (a1_in) @(negedge clk);
    end
  end
  initial begin
    d4_in = '0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < NWORDS; n++) begin
      sent4[n] = 4'($urandom);
      d4_in = enc4(sent4[n]);
      nsent4++;
      while (!a4_in) @(negedge clk);
      d4_in = '0;
      while (a4_in) @(negedge clk);
    end
  end

  // receivers and checks
  dr_bit_t [3:0] prev4;
  dr_bit_t       prev1;
  initial begin
    a1_out = 1'b0; a4_out = 1'b0; prev1 = '0; prev4 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!(done1 && done4)) begin
      @(negedge clk);
      // code rules on the outputs
      checks++;
      if ((dr_is_valid(prev1) && dr_is_valid(d1_out[0]) && prev1 != d1_out[0]) || dr_is_illegal(d1_out[0]))
        failures++;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if ((dr_is_valid(prev4[i]) && dr_is_valid(d4_out[i]) && prev4[i] != d4_out[i]) || dr_is_illegal(d4_out[i]))
          failures++;
      end
      prev1 = d1_out[0]; prev4 = d4_out;
      if (nsent1 - nrecv1 > maxocc1) maxocc1 = nsent1 - nrecv1;
      if (nsent4 - nrecv4 > maxocc4) maxocc4 = nsent4 - nrecv4;
      // receiver 1
      if (!done1 && $urandom_range(0, 2) == 0) begin
        if (!a1_out && dr_is_valid(d1_out[0])) begin
          checks++;
          if (d1_out[0].t !== sent1[nrecv1][0]) begin
            failures++;
            $display("W=1 word %0d: got %0b expected %0b", nrecv1, d1_out[0].t, sent1[nrecv1][0]);
          end
          nrecv1++;
          a1_out = 1'b1;
        end else if (a1_out && d1_out[0] == DR_EMPTY) begin
          a1_out = 1'b0;
          if (nrecv1 == NWORDS) done1 = 1;
        end
      end
      // receiver 4
      if (!done4 && $urandom_range(0, 2) == 0) begin
        if (!a4_out && all_valid(d4_out, 4)) begin
          checks++;
          if (dec4(d4_out) !== sent4[nrecv4]) begin
            failures++;
            $display("W=4 word %0d: got %h expected %h", nrecv4, dec4(d4_out), sent4[nrecv4]);
          end
          nrecv4++;
          a4_out = 1'b1;
        end else if (a4_out && d4_out == '0) begin
          a4_out = 1'b0;
          if (nrecv4 == NWORDS) done4 = 1;
        end
      end
    end
    checks++; if (maxocc1 < 2) failures++;
    checks++; if (maxocc4 < 2) failures++;
    $display("words in flight at most: %0d (W=1), %0d (W=4)", maxocc1, maxocc4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
