// alu_slice: one bit of the asynchronous ALU, modelled on a domino gate.
//
// Operand conditioning (the paper's function table): the a bit is passed true,
// complemented or forced to zero by x, the b bit true or complemented by y.
// From the conditioned bits the slice forms generate g = a&b, kill k = ~a&~b
// and propagate p = a^b.
//
// In arithmetic mode (add = 1) the carry is dual-rail: cout.t means carry 1,
// cout.f carry 0, both low means "not yet known". The two rails are domino
// nodes: while eval is low they are precharged to empty; while eval is high
// each can only be set, never cleared, and holds its value until the next
// precharge. cout.t is set by g, or by p with cin.t; cout.f by k, or by p with
// cin.f. A slice that generates or kills thus resolves at once, and only
// propagating slices wait for the carry from below, which makes the add time
// depend on the longest propagate run. The sum is the dual-rail XOR of p with
// the incoming carry, high only once cin is valid.
//
// In logic mode (add = 0) the result is func (AND, XOR or OR) of the
// conditioned bits, and the carry resolves to a valid 0 immediately so that
// completion detection does not wait on an unused carry chain; this is a
// choice of this design, the paper does not say what the carry does then.
//
// The result is single-rail, bundled with the carry chain: it is correct once
// cin and cout are valid. It is low during precharge. The node update happens
// on the rising edge of clk, one tick per domino stage (see c_element).
module alu_slice
  import dr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    eval,    // domino clock: 0 = precharge (empty), 1 = evaluate
  input  logic    a,
  input  logic    b,
  input  a_sel_t  x,       // a conditioning
  input  logic    y,       // b conditioning, 1 = complement
  input  func_t   func,
  input  logic    add,
  input  dr_bit_t cin,
  output logic    result,
  output dr_bit_t cout
);

  logic ac, bc, g, k, p;

  always_comb begin
    unique case (x)
      A_TRUE:  ac = a;
      A_COMPL: ac = ~a;
      default: ac = 1'b0;
    endcase
    bc = y ? ~b : b;
    g  = ac & bc;
    k  = ~ac & ~bc;
    p  = ac ^ bc;
  end

  // Domino carry nodes: precharge to empty, then monotonic set.
  logic c1_set, c0_set;
  always_comb begin
    if (add) begin
      c1_set = g | (p & cin.t);
      c0_set = k | (p & cin.f);
    end else begin
      c1_set = 1'b0;
      c0_set = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cout <= DR_EMPTY;
    end else if (!eval) begin
      cout <= DR_EMPTY;
    end else begin
      cout.t <= cout.t | c1_set;
      cout.f <= cout.f | c0_set;
    end
  end

  // Result: dual-rail sum in add mode, bitwise function otherwise.
  logic logic_r;
  always_comb begin
    unique case (func)
      F_AND:   logic_r = ac & bc;
      F_XOR:   logic_r = p;
      default: logic_r = ac | bc;
    endcase
    if (!eval)
      result = 1'b0;
    else if (add)
      result = (p & cin.f) | (~p & cin.t);
    else
      result = logic_r;
  end

  // The carry chain must never show both rails high.
  assert property (@(posedge clk) disable iff (!rst_n) !(cout.t && cout.f))
    else $error("alu_slice: illegal dual-rail carry {1,1}");

endmodule
