// muller_pipeline: the Muller pipeline that relays 4-phase handshakes.
//
// Stage i is one C-element whose inputs are the request from stage i-1 and the
// inverted state of stage i+1: C[i] takes a 1 from its predecessor only while
// its successor is 0, and a 0 only while its successor is 1. All stages start
// at 0. The stage outputs are at once the request to the next stage and the
// acknowledge to the previous one. N = 3 stages as in the paper's example.
//
// Interface: req_in / ack_in towards the sender, req_out / ack_out towards the
// receiver, all 4-phase (return to zero). stage exposes C[0..N-1]. Each stage
// takes one tick (see c_element).
module muller_pipeline #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_in,
  output logic         ack_in,
  output logic         req_out,
  input  logic         ack_out,
  output logic [N-1:0] stage
);

  for (genvar i = 0; i < N; i++) begin : g_stage
    logic pred, succ;
    if (i == 0) begin : g_first
      assign pred = req_in;
    end else begin : g_mid
      assign pred = stage[i-1];
    end
    if (i == N - 1) begin : g_last
      assign succ = ack_out;
    end else begin : g_inner
      assign succ = stage[i+1];
    end
    c_element u_c (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (pred),
      .b    (~succ),
      .z    (stage[i])
    );
  end

  assign ack_in  = stage[0];
  assign req_out = stage[N-1];

endmodule
