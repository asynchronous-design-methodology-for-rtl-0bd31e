// tb_alu_opdec: self-checking test of the function decoder.
// For every one of the sixteen functions and many random operand pairs and
// carry flags it applies the decoded control word to a word-wide model of the
// slices (conditioning, then AND/XOR/OR or addition with the decoded carry-in)
// and compares with the function's arithmetic definition written out here
// independently (a + b, a - b, b - a, a & ~b, ~b, ...).
module tb_alu_opdec;
  import dr_pkg::*;
  alu_op_t op;
  slice_ctrl_t ctrl;
  int checks = 0, failures = 0;

  alu_opdec dut (.op(op), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [32:0] golden(input alu_op_t o, input logic [31:0] a, b, input logic c);
    case (o)
      OP_AND, OP_TST: return {1'b0, a & b};
      OP_EOR, OP_TEQ: return {1'b0, a ^ b};
      OP_ORR:         return {1'b0, a | b};
      OP_BIC:         return {1'b0, a & ~b};
      OP_MOV:         return {1'b0, b};
      OP_MVN:         return {1'b0, ~b};
      OP_ADD, OP_CMN: return {1'b0, a} + {1'b0, b};
      OP_ADC:         return {1'b0, a} + {1'b0, b} + 33'(c);
      OP_SUB, OP_CMP: return {1'b0, a} + {1'b0, ~b} + 33'd1;   // carry = no borrow
      OP_SBC:         return {1'b0, a} + {1'b0, ~b} + 33'(c);
      OP_RSB:         return {1'b0, b} + {1'b0, ~a} + 33'd1;
      OP_RSC:         return {1'b0, b} + {1'b0, ~a} + 33'(c);
      default:        return '0;
    endcase
  endfunction

  function automatic logic [32:0] apply(input slice_ctrl_t k, input logic [31:0] a, b, input logic c);
    logic [31:0] ac, bc;
    logic ci;
    ac = (k.x == A_TRUE) ? a : (k.x == A_COMPL) ? ~a : '0;
    bc = k.y ? ~b : b;
    ci = (k.cin == CIN_ONE) ? 1'b1 : (k.cin == CIN_FLAG) ? c : 1'b0;
    if (k.add) return {1'b0, ac} + {1'b0, bc} + 33'(ci);
    case (k.func)
      F_AND:   return {1'b0, ac & bc};
      F_XOR:   return {1'b0, ac ^ bc};
      default: return {1'b0, ac | bc};
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 16; o++) begin
      op = alu_op_t'(o);
      #1;
      for (int n = 0; n < 200; n++) begin
        logic [31:0] a, b;
        logic c;
        logic [32:0] g, m;
        a = $urandom; b = $urandom; c = 1'($urandom_range(0, 1));
        if (n == 0) begin a = '1; b = '0; end
        g = golden(op, a, b, c);
        m = apply(ctrl, a, b, c);
        checks++;
        // the carry only matters for the arithmetic functions
        if (m[31:0] !== g[31:0] || (ctrl.add && m[32] !== g[32])) begin
          failures++;
          if (failures < 10) $display("%s a=%h b=%h c=%0b got %h exp %h", op.name(), a, b, c, m, g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
