// tb_c_element: self-checking test of the Muller C-element.
// Drives random input pairs, one per tick, and compares the output with the
// rule z' = a&b | z&(a|b) kept in a reference variable. Also checks the reset
// value and that both "hold" cases actually occurred.
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, z;
  int checks = 0, failures = 0, holds = 0;
  logic zref;

  c_element dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (z !== 1'b0) failures++;
    rst_n = 1'b1;
    zref  = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
      if (a != b) holds++;
      @(posedge clk);
      if (a && b) zref = 1'b1;
      else if (!a && !b) zref = 1'b0;
      #1;
      checks++;
      if (z !== zref) begin
        failures++;
        $display("mismatch a=%0b b=%0b z=%0b exp=%0b", a, b, z, zref);
      end
    end
    checks++; if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
