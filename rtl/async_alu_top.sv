// async_alu_top: the complete design.
//
// Holds the 32-bit self-timed ALU (async_alu32) and, beside it, the 4-phase
// dual-rail pipeline (dr_pipeline) that illustrates how dual-rail data moves
// between self-timed blocks. The two are independent: the ALU's channels are
// bundled data with request/acknowledge pairs, the pipeline's are dual-rail
// words whose validity is their own request. Their ports are brought out
// unchanged, the pipeline's with a pl_ prefix. All parameters default to the
// sizes of the paper: a 32-bit ALU and a one-bit, three-stage pipeline.
//
// Every state element runs on the rising edge of clk, one gate delay per tick;
// rst_n is an asynchronous active-low reset that leaves every C-element at 0
// and every dual-rail node empty. See async_alu32 and dr_pipeline for the
// handshake rules and timing of each channel.
module async_alu_top
  import dr_pkg::*;
#(
  parameter int unsigned W    = 32,  // ALU word width
  parameter int unsigned PL_W = 1,   // pipeline word width
  parameter int unsigned PL_N = 3    // pipeline depth
) (
  input  logic               clk,
  input  logic               rst_n,
  // ALU input channel
  input  logic               req_in,
  output logic               ack_in,
  input  alu_op_t            op,
  input  logic [W-1:0]       a,
  input  logic [W-1:0]       b,
  input  logic               c_flag,
  // ALU output channel
  output logic               req_out,
  input  logic               ack_out,
  output logic [W-1:0]       result,
  output logic               cout,
  output dr_bit_t            cout_dr,
  output logic               eval,
  output logic               proto_err,
  // dual-rail pipeline
  input  dr_bit_t [PL_W-1:0] pl_d_in,
  output logic               pl_ack_in,
  output dr_bit_t [PL_W-1:0] pl_d_out,
  input  logic               pl_ack_out
);

  async_alu32 #(.W(W)) u_alu (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_in   (req_in),
    .ack_in   (ack_in),
    .op       (op),
    .a        (a),
    .b        (b),
    .c_flag   (c_flag),
    .req_out  (req_out),
    .ack_out  (ack_out),
    .result   (result),
    .cout     (cout),
    .cout_dr  (cout_dr),
    .eval     (eval),
    .proto_err(proto_err)
  );

  dr_pipeline #(.W(PL_W), .N(PL_N)) u_pipe (
    .clk    (clk),
    .rst_n  (rst_n),
    .d_in   (pl_d_in),
    .ack_in (pl_ack_in),
    .d_out  (pl_d_out),
    .ack_out(pl_ack_out)
  );

endmodule
