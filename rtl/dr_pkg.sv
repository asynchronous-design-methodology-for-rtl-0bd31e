// dr_pkg: types and helpers shared by the asynchronous ALU.
//
// A 4-phase dual-rail bit carries one data bit on two wires, f (false) and t
// (true): {f,t} = {1,0} is a valid 0, {0,1} a valid 1 and {0,0} the empty
// spacer that separates two data items. {1,1} is never used, and a bit must
// pass through empty between two valid values. The struct keeps the rails in
// the order {f, t} so that a packed value reads like the codeword tables.
//
// The ALU function codes follow the ARM data-processing numbering, because the
// function list (AND, ADD, ... MVN) is the ARM ALU's; the numbering itself is a
// choice of this design.
package dr_pkg;

  typedef struct packed {
    logic f;  // false rail: high for a valid 0
    logic t;  // true rail:  high for a valid 1
  } dr_bit_t;

  localparam dr_bit_t DR_EMPTY = '{f: 1'b0, t: 1'b0};

  // Encode a single-rail bit as a valid dual-rail codeword.
  function automatic dr_bit_t dr_encode(input logic v);
    return '{f: ~v, t: v};
  endfunction

  // A bit is valid when exactly one rail is high.
  function automatic logic dr_is_valid(input dr_bit_t d);
    return d.t ^ d.f;
  endfunction

  function automatic logic dr_is_illegal(input dr_bit_t d);
    return d.t & d.f;
  endfunction

  // Conditioning of the a operand: true, complemented or forced to zero.
  typedef enum logic [1:0] {
    A_TRUE  = 2'd0,
    A_COMPL = 2'd1,
    A_ZERO  = 2'd2
  } a_sel_t;

  // Basic bitwise operation of a slice in logic (non-add) mode.
  typedef enum logic [1:0] {
    F_AND = 2'd0,
    F_XOR = 2'd1,
    F_OR  = 2'd2
  } func_t;

  // Where the carry into bit 0 comes from.
  typedef enum logic [1:0] {
    CIN_ZERO = 2'd0,
    CIN_ONE  = 2'd1,
    CIN_FLAG = 2'd2
  } cin_src_t;

  // The sixteen ALU functions.
  typedef enum logic [3:0] {
    OP_AND = 4'd0,   // a & b
    OP_EOR = 4'd1,   // a ^ b
    OP_SUB = 4'd2,   // a - b
    OP_RSB = 4'd3,   // b - a
    OP_ADD = 4'd4,   // a + b
    OP_ADC = 4'd5,   // a + b + C
    OP_SBC = 4'd6,   // a - b - !C
    OP_RSC = 4'd7,   // b - a - !C
    OP_TST = 4'd8,   // test bits: a & b
    OP_TEQ = 4'd9,   // test equal: a ^ b
    OP_CMP = 4'd10,  // compare: a - b
    OP_CMN = 4'd11,  // compare negative: a + b
    OP_ORR = 4'd12,  // a | b
    OP_MOV = 4'd13,  // b
    OP_BIC = 4'd14,  // bit clear: a & ~b
    OP_MVN = 4'd15   // ~b
  } alu_op_t;

  // Control word of one bit slice, shared by all 32 slices.
  typedef struct packed {
    a_sel_t   x;     // a-input conditioning
    logic     y;     // b-input conditioning: 1 = complement
    func_t    func;  // bitwise operation when add = 0
    logic     add;   // 1 = arithmetic (sum and dual-rail carry)
    cin_src_t cin;   // carry into bit 0
  } slice_ctrl_t;

endpackage
