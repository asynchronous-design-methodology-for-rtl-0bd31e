// alu_opdec: function decoder of the ALU.
//
// Turns one of the sixteen ALU functions into the control word shared by all
// bit slices. The a-input and b-input conditioning and the basic operation of
// each function follow the paper's function table. The carry into bit 0 is
// this design's choice, by two's-complement arithmetic: 1 for subtract,
// reverse subtract and compare, the carry flag for the three "with carry"
// forms, 0 otherwise. The flag-only functions (test bits, test equal,
// compare, compare negative) compute the same value as AND, XOR, SUB and ADD.
// Purely combinational.
module alu_opdec
  import dr_pkg::*;
(
  input  alu_op_t     op,
  output slice_ctrl_t ctrl
);

  always_comb begin
    ctrl = '{x: A_TRUE, y: 1'b0, func: F_AND, add: 1'b0, cin: CIN_ZERO};
    unique case (op)
      OP_AND, OP_TST: ctrl = '{x: A_TRUE,  y: 1'b0, func: F_AND, add: 1'b0, cin: CIN_ZERO};
      OP_BIC:         ctrl = '{x: A_TRUE,  y: 1'b1, func: F_AND, add: 1'b0, cin: CIN_ZERO};
      OP_EOR, OP_TEQ: ctrl = '{x: A_TRUE,  y: 1'b0, func: F_XOR, add: 1'b0, cin: CIN_ZERO};
      OP_ORR:         ctrl = '{x: A_TRUE,  y: 1'b0, func: F_OR,  add: 1'b0, cin: CIN_ZERO};
      OP_MOV:         ctrl = '{x: A_ZERO,  y: 1'b0, func: F_OR,  add: 1'b0, cin: CIN_ZERO};
      OP_MVN:         ctrl = '{x: A_ZERO,  y: 1'b1, func: F_OR,  add: 1'b0, cin: CIN_ZERO};
      OP_ADD, OP_CMN: ctrl = '{x: A_TRUE,  y: 1'b0, func: F_AND, add: 1'b1, cin: CIN_ZERO};
      OP_ADC:         ctrl = '{x: A_TRUE,  y: 1'b0, func: F_AND, add: 1'b1, cin: CIN_FLAG};
      OP_SUB, OP_CMP: ctrl = '{x: A_TRUE,  y: 1'b1, func: F_AND, add: 1'b1, cin: CIN_ONE};
      OP_SBC:         ctrl = '{x: A_TRUE,  y: 1'b1, func: F_AND, add: 1'b1, cin: CIN_FLAG};
      OP_RSB:         ctrl = '{x: A_COMPL, y: 1'b0, func: F_AND, add: 1'b1, cin: CIN_ONE};
      OP_RSC:         ctrl = '{x: A_COMPL, y: 1'b0, func: F_AND, add: 1'b1, cin: CIN_FLAG};
      default:        ;
    endcase
  end

endmodule
