// tb_dr_protocol_checker: self-checking test of the dual-rail code checker.
// Drives a 4-bit word through legal sequences (empty -> valid -> empty, in any
// bit order) and through each kind of breach: a {1,1} codeword and a direct
// 0 <-> 1 change of a valid bit. bad_code and bad_step must flag exactly the
// breaches, and err must become and stay 1 after the first one until reset.
module tb_dr_protocol_checker;
  import dr_pkg::*;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  dr_bit_t [W-1:0] d = '0;
  logic bad_code, bad_step, err;
  int checks = 0, failures = 0;

  dr_protocol_checker #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .bad_code(bad_code),
                                    .bad_step(bad_step), .err(err));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input dr_bit_t [W-1:0] v, input logic exp_code, exp_step, exp_err);
    d = v;
    #1;
    checks++;
    if (bad_code !== exp_code || bad_step !== exp_step) begin
      failures++;
      $display("d=%b code=%0b step=%0b expected %0b %0b", v, bad_code, bad_step, exp_code, exp_step);
    end
    @(negedge clk);
    checks++;
    if (err !== exp_err) begin
      failures++;
      $display("d=%b err=%0b expected %0b", v, err, exp_err);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // legal traffic
    for (int n = 0; n < 100; n++) begin
      dr_bit_t [W-1:0] v = '0;
      for (int i = 0; i < W; i++) begin
        v[i] = dr_encode(1'($urandom_range(0, 1)));
        step(v, 1'b0, 1'b0, 1'b0);      // bits become valid one by one
      end
      for (int i = 0; i < W; i++) begin
        v[i] = DR_EMPTY;
        step(v, 1'b0, 1'b0, 1'b0);
      end
    end
    // illegal codeword
    step({DR_EMPTY, DR_EMPTY, dr_bit_t'(2'b11), DR_EMPTY}, 1'b1, 1'b0, 1'b1);
    step('0, 1'b0, 1'b0, 1'b1);          // sticky
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    step('0, 1'b0, 1'b0, 1'b0);
    // valid 0 straight to valid 1
    step({DR_EMPTY, DR_EMPTY, DR_EMPTY, dr_encode(1'b0)}, 1'b0, 1'b0, 1'b0);
    step({DR_EMPTY, DR_EMPTY, DR_EMPTY, dr_encode(1'b1)}, 1'b0, 1'b1, 1'b1);
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    step('0, 1'b0, 1'b0, 1'b0);
    // valid 1 straight to valid 0 on the top bit
    step({dr_encode(1'b1), DR_EMPTY, DR_EMPTY, DR_EMPTY}, 1'b0, 1'b0, 1'b0);
    step({dr_encode(1'b0), DR_EMPTY, DR_EMPTY, DR_EMPTY}, 1'b0, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
