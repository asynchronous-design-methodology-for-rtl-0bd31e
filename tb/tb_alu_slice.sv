// tb_alu_slice: self-checking test of one ALU bit slice.
// Runs every combination of operand bits, a/b conditioning, basic operation,
// add mode and carry-in (empty, 0, 1) through a precharge/evaluate cycle and
// compares result and dual-rail carry with values computed here from the
// function table. It checks that precharge empties the carry, that a
// generating or killing slice resolves without a carry-in, that a propagating
// slice waits for it and resolves one tick after it arrives, and that an
// evaluated carry holds when the carry-in returns to empty. Finally it replays
// the four-step add sequence with carry-in 1, a = 0011, b = 0101, which must
// give sum 1001, carry-false rail 1000 and carry-true rail 0111.
module tb_alu_slice;
  import dr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0, a = 1'b0, b = 1'b0, y = 1'b0, add = 1'b0;
  a_sel_t x = A_TRUE;
  func_t func = F_AND;
  dr_bit_t cin = DR_EMPTY, cout;
  logic result;
  int checks = 0, failures = 0, waited = 0;

  alu_slice dut (.clk(clk), .rst_n(rst_n), .eval(eval), .a(a), .b(b), .x(x), .y(y),
                 .func(func), .add(add), .cin(cin), .result(result), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [2:0] got, input logic [2:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: x=%0d y=%0b func=%0d add=%0b a=%0b b=%0b cin=%b got {f,t,r}=%b exp %b",
               what, x, y, func, add, a, b, cin, got, exp);
    end
  endtask

  // reference
  function automatic logic [2:0] ref_out(input logic ra, rb, input a_sel_t rx, input logic ry,
                                         input func_t rf, input logic radd, input dr_bit_t rc);
    logic ac, bc, ct, cf, r;
    ac = (rx == A_TRUE) ? ra : (rx == A_COMPL) ? !ra : 1'b0;
    bc = ry ? !rb : rb;
    if (radd) begin
      int s;
      if (rc == DR_EMPTY) begin
        ct = ac && bc;            // generate resolves alone
        cf = !ac && !bc;          // kill resolves alone
        r  = 1'b0;                // sum not yet known
      end else begin
        s  = int'(ac) + int'(bc) + int'(rc.t);
        ct = s >= 2;
        cf = s < 2;
        r  = s[0];
      end
    end else begin
      ct = 1'b0;
      cf = 1'b1;
      r  = (rf == F_AND) ? (ac & bc) : (rf == F_XOR) ? (ac ^ bc) : (ac | bc);
    end
    return {cf, ct, r};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int ix = 0; ix < 3; ix++)
    for (int iy = 0; iy < 2; iy++)
    for (int ifn = 0; ifn < 3; ifn++)
    for (int iad = 0; iad < 2; iad++)
    for (int ia = 0; ia < 2; ia++)
    for (int ib = 0; ib < 2; ib++)
    for (int ic = 0; ic < 3; ic++) begin
      // precharge
      eval = 1'b0; cin = DR_EMPTY;
      @(negedge clk);
      expect_eq({cout, result}, 3'b000, "precharge");
      // evaluate
      x = a_sel_t'(ix); y = 1'(iy); func = func_t'(ifn); add = 1'(iad);
      a = 1'(ia); b = 1'(ib);
      cin = (ic == 0) ? DR_EMPTY : dr_encode(1'(ic - 1));
      eval = 1'b1;
      #1;
      // before the clock edge the carry nodes are still precharged
      checks++; if (cout !== DR_EMPTY) failures++;
      @(negedge clk);
      expect_eq({cout, result}, ref_out(a, b, x, y, func, add, cin), "evaluate");
      if (ic == 0 && add && ((x == A_ZERO ? 1'b0 : (x == A_COMPL ? !a : a)) ^ (y ? !b : b))) begin
        // a propagating slice must still be waiting
        checks++; if (cout !== DR_EMPTY) failures++;
        waited++;
        cin = dr_encode(1'($urandom_range(0, 1)));
        @(negedge clk);
        expect_eq({cout, result}, ref_out(a, b, x, y, func, add, cin), "late carry");
      end
      // monotonic hold: carry stays when cin goes back to empty
      begin
        dr_bit_t held;
        held = cout;
        cin = DR_EMPTY;
        @(negedge clk);
        checks++;
        if (cout !== held) begin
          failures++;
          $display("carry not held: was %b now %b", held, cout);
        end
      end
    end
    checks++; if (waited == 0) failures++;

    // four-step add, carry-in 1
    begin
      logic [3:0] av = 4'b0011, bv = 4'b0101, sum, c0, c1;
      x = A_TRUE; y = 1'b0; add = 1'b1; func = F_AND;
      for (int s = 3; s >= 0; s--) begin
        eval = 1'b0; cin = DR_EMPTY;
        @(negedge clk);
        a = av[s]; b = bv[s]; cin = dr_encode(1'b1); eval = 1'b1;
        @(negedge clk);
        sum[s] = result; c0[s] = cout.f; c1[s] = cout.t;
      end
      checks++; if (sum !== 4'b1001) failures++;
      checks++; if (c0  !== 4'b1000) failures++;
      checks++; if (c1  !== 4'b0111) failures++;
      $display("sequence: output=%b C0out=%b C1out=%b", sum, c0, c1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
