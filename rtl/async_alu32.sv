// async_alu32: 32-bit self-timed ALU with a dual-rail ripple carry.
//
// W bit slices (alu_slice) share one control word from the function decoder
// (alu_opdec) and are chained through their dual-rail carries. The input side
// is one stage of a Sutherland-style micropipeline: a one-stage Muller
// pipeline (a single C-element) computes eval = C(req_in, ~ack_out). Its rising edge loads the operands, the function
// and the carry flag into a capture register and starts the domino slices
// evaluating; it is also returned to the sender as ack_in. It falls, which
// precharges the slices back to empty, only once the sender has dropped its
// request and the receiver has acknowledged the result.
//
// The carry into bit 0 is converted to dual-rail and driven only while eval
// is high. A completion detector (C-element tree) watches all W carry-outs:
// its output rises when every carry is valid, i.e. when the slowest carry has
// arrived, and falls when every carry has precharged. That signal is the
// output request req_out, and the result bus (bundled data) is valid while it
// is high. The time from request to req_out depends on the data: a slice that
// generates or kills resolves at once and only runs of propagating slices
// ripple, one tick per bit. req_out rises on the (1 + L + $clog2(W))-th rising
// clock edge after req_in is first seen high (with ack_out low), where L is the
// settling time of the slowest carry: 1 for a slice that generates or kills,
// one more than its lower neighbour for a slice that propagates, and 1 for
// every slice in the logic functions.
//
// Handshake (4-phase, return to zero) on both sides:
//   sender:   drive data, raise req_in; wait ack_in = 1; drop req_in (data may
//             now change); wait ack_in = 0.
//   receiver: wait req_out = 1; take result/cout; raise ack_out; wait
//             req_out = 0; drop ack_out.
// The 4-phase protocol, the C-elements, the domino slices and completion
// detection are the paper's; the capture register and this exact wiring
// of the stage are this design's choices. A dr_protocol_checker watches the
// carry chain; proto_err is its sticky error flag.
module async_alu32
  import dr_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,      // gate-delay tick of the timing model
  input  logic         rst_n,
  // input channel (bundled data)
  input  logic         req_in,
  output logic         ack_in,
  input  alu_op_t      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c_flag,   // carry flag for ADC, SBC, RSC
  // output channel (bundled data)
  output logic         req_out,
  input  logic         ack_out,
  output logic [W-1:0] result,
  output logic         cout,     // carry out of the top bit
  output dr_bit_t      cout_dr,  // the same, dual-rail
  // status
  output logic         eval,     // 1 = evaluate, 0 = precharge
  output logic         proto_err
);

  slice_ctrl_t     ctrl;
  dr_bit_t [W-1:0] carry;   // carry out of each slice
  dr_bit_t         cin0;
  logic            cin_val;
  logic            done;

  // Capture register: loaded on the edge at which eval rises.
  alu_op_t      op_q;
  logic [W-1:0] a_q, b_q;
  logic         c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= OP_AND;
      a_q  <= '0;
      b_q  <= '0;
      c_q  <= 1'b0;
    end else if (!eval && req_in && !ack_out) begin
      op_q <= op;
      a_q  <= a;
      b_q  <= b;
      c_q  <= c_flag;
    end
  end

  alu_opdec u_dec (.op(op_q), .ctrl(ctrl));

  // Stage control: evaluate while a request is pending and the receiver has
  // released the previous result; hold until both have moved on.
  // A one-stage Muller pipeline: its C-element is eval = C(req_in, ~ack_out).
  logic stage_req, stage_ack;
  muller_pipeline #(.N(1)) u_stage (
    .clk    (clk),
    .rst_n  (rst_n),
    .req_in (req_in),
    .ack_in (stage_ack),
    .req_out(stage_req),
    .ack_out(ack_out),
    .stage  (eval)
  );

  always_comb begin
    unique case (ctrl.cin)
      CIN_ONE:  cin_val = 1'b1;
      CIN_FLAG: cin_val = c_q;
      default:  cin_val = 1'b0;
    endcase
    cin0 = eval ? dr_encode(cin_val) : DR_EMPTY;
  end

  for (genvar i = 0; i < W; i++) begin : g_slice
    dr_bit_t ci;
    if (i == 0) begin : g_lsb
      assign ci = cin0;
    end else begin : g_chain
      assign ci = carry[i-1];
    end
    alu_slice u_slice (
      .clk   (clk),
      .rst_n (rst_n),
      .eval  (eval),
      .a     (a_q[i]),
      .b     (b_q[i]),
      .x     (ctrl.x),
      .y     (ctrl.y),
      .func  (ctrl.func),
      .add   (ctrl.add),
      .cin   (ci),
      .result(result[i]),
      .cout  (carry[i])
    );
  end

  completion_detector #(.W(W)) u_cd (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (carry),
    .done (done)
  );

  assign req_out = done;
  assign cout_dr = carry[W-1];
  assign cout    = carry[W-1].t;

  assign ack_in  = stage_ack;  // equals eval

  dr_protocol_checker #(.W(W)) u_chk (
    .clk     (clk),
    .rst_n   (rst_n),
    .d       (carry),
    .bad_code(),
    .bad_step(),
    .err     (proto_err)
  );

endmodule
