// dr_pipeline: a 4-phase dual-rail pipeline built on the Muller pipeline.
//
// Each of the N stages holds one W-bit dual-rail word in C-elements, one per
// rail, whose second input is the inverted acknowledge of the next stage. A
// stage therefore copies a valid word forward only after its successor has
// gone empty, and copies the empty spacer only after its successor holds data.
// The acknowledge a stage returns to its predecessor is its completion signal:
// 1 when it holds a valid word, 0 when it is empty (a completion_detector, the
// OR of the two rails when W = 1). Defaults: one bit, three stages, as in the
// paper's Muller pipeline example; wider words are this design's extension.
//
// Interface: d_in / ack_in towards the sender, d_out / ack_out towards the
// receiver. The sender alternates valid words and empty, waiting for ack_in to
// rise after a word and to fall after the spacer. All stages reset empty.
module dr_pipeline
  import dr_pkg::*;
#(
  parameter int unsigned W = 1,
  parameter int unsigned N = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dr_bit_t [W-1:0] d_in,
  output logic            ack_in,
  output dr_bit_t [W-1:0] d_out,
  input  logic            ack_out
);

  dr_bit_t [N-1:0][W-1:0] q;     // stage contents
  logic    [N-1:0]        ack;   // completion of each stage

  for (genvar s = 0; s < N; s++) begin : g_stage
    dr_bit_t [W-1:0] src;
    logic            succ_ack;
    if (s == 0) begin : g_first
      assign src = d_in;
    end else begin : g_mid
      assign src = q[s-1];
    end
    if (s == N - 1) begin : g_last
      assign succ_ack = ack_out;
    end else begin : g_inner
      assign succ_ack = ack[s+1];
    end
    for (genvar b = 0; b < W; b++) begin : g_bit
      c_element u_t (.clk(clk), .rst_n(rst_n), .a(src[b].t), .b(~succ_ack), .z(q[s][b].t));
      c_element u_f (.clk(clk), .rst_n(rst_n), .a(src[b].f), .b(~succ_ack), .z(q[s][b].f));
    end
    completion_detector #(.W(W)) u_cd (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (q[s]),
      .done (ack[s])
    );
  end

  assign ack_in = ack[0];
  assign d_out  = q[N-1];

endmodule
