// tb_async_alu32: end-to-end test of the 32-bit self-timed ALU at its default
// parameters.
// A sender issues operations through the 4-phase input handshake and a
// receiver with random response delays takes the results through the output
// handshake. Every result and, for arithmetic functions, the carry out is
// compared with the function's definition computed here. The time from a
// request to req_out is compared, exactly, with the value predicted from the
// operands: 1 + L + log2(W) rising clock edges, counted from the edge at
// which the stage starts evaluating (eval rises), where L is the settling time
// of the slowest carry (one tick for a slice that generates or kills, one more
// than its lower neighbour for a slice that propagates).
// Mechanisms counted, each must occur: all sixteen functions; the carry-in
// taken from the carry flag; an add that completes early (L = 1); an add whose
// carry ripples through all W bits (L = W); the precharge of the carry chain
// to empty between operations; a receiver that holds ack_out off, so that the
// ALU keeps its result; and no dual-rail code breach anywhere on the chain.
module tb_async_alu32;
  import dr_pkg::*;
  localparam int W = 32;
  localparam int LOGW = $clog2(W);
  localparam int NOPS = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_in = 1'b0, ack_out = 1'b0, c_flag = 1'b0;
  alu_op_t op = OP_AND;
  logic [W-1:0] a = '0, b = '0;
  logic ack_in, req_out, cout, eval, proto_err;
  dr_bit_t cout_dr;
  logic [W-1:0] result;

  async_alu32 dut (
    .clk(clk), .rst_n(rst_n),
    .req_in(req_in), .ack_in(ack_in), .op(op), .a(a), .b(b), .c_flag(c_flag),
    .req_out(req_out), .ack_out(ack_out), .result(result), .cout(cout), .cout_dr(cout_dr),
    .eval(eval), .proto_err(proto_err)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int op_seen [16];
  int n_flag_cin = 0, n_early = 0, n_full_ripple = 0, n_precharge = 0, n_held = 0;
  int lat_min = 1 << 30, lat_max = 0;
  longint lat_sum = 0;
  int lat_n = 0;

  initial begin
    repeat (NOPS * 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W:0] golden(input alu_op_t o, input logic [W-1:0] x, y, input logic c);
    case (o)
      OP_AND, OP_TST: return {1'b0, x & y};
      OP_EOR, OP_TEQ: return {1'b0, x ^ y};
      OP_ORR:         return {1'b0, x | y};
      OP_BIC:         return {1'b0, x & ~y};
      OP_MOV:         return {1'b0, y};
      OP_MVN:         return {1'b0, ~y};
      OP_ADD, OP_CMN: return {1'b0, x} + {1'b0, y};
      OP_ADC:         return {1'b0, x} + {1'b0, y} + (W+1)'(c);
      OP_SUB, OP_CMP: return {1'b0, x} + {1'b0, ~y} + (W+1)'(1);
      OP_SBC:         return {1'b0, x} + {1'b0, ~y} + (W+1)'(c);
      OP_RSB:         return {1'b0, y} + {1'b0, ~x} + (W+1)'(1);
      OP_RSC:         return {1'b0, y} + {1'b0, ~x} + (W+1)'(c);
      default:        return '0;
    endcase
  endfunction

  function automatic logic is_arith(input alu_op_t o);
    return o inside {OP_ADD, OP_ADC, OP_SUB, OP_RSB, OP_SBC, OP_RSC, OP_CMP, OP_CMN};
  endfunction

  // settling time of the slowest carry, in ticks
  function automatic int carry_settle(input alu_op_t o, input logic [W-1:0] x, y);
    logic [W-1:0] xa, yb;
    int t, l;
    if (!is_arith(o)) return 1;
    xa = (o inside {OP_RSB, OP_RSC}) ? ~x : x;
    yb = (o inside {OP_SUB, OP_SBC, OP_CMP}) ? ~y : y;
    t = 0; l = 0;
    for (int i = 0; i < W; i++) begin
      t = (xa[i] ^ yb[i]) ? t + 1 : 1;
      if (t > l) l = t;
    end
    return l;
  endfunction

  // code rules and precharge observation on the carry chain
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (proto_err) failures++;
      if (!eval && dut.carry == '0 && $past(dut.carry) != '0) n_precharge++;
    end
  end

  // receiver
  int rx_count = 0;
  logic [W:0] exp_q[$];
  initial begin
    wait (rst_n);
    forever begin
      int hold;
      logic [W:0] e;
      @(negedge clk);
      if (req_out && !ack_out) begin
        e = exp_q.pop_front();
        checks++;
        if (result !== e[W-1:0]) begin
          failures++;
          if (failures < 10) $display("result %h expected %h", result, e[W-1:0]);
        end
        // hold the result for a while: it must stay put
        hold = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 6) : 0;
        if (hold > 0) n_held++;
        repeat (hold) begin
          @(negedge clk);
          checks++;
          if (!req_out || result !== e[W-1:0]) failures++;
        end
        ack_out = 1'b1;
        rx_count++;
        while (req_out) @(negedge clk);
        repeat ($urandom_range(0, 2)) @(negedge clk);
        ack_out = 1'b0;
      end
    end
  end

  // sender
  task automatic issue(input alu_op_t o, input logic [W-1:0] x, y, input logic c);
    logic [W:0] g;
    int lat, expl;
    op = o; a = x; b = y; c_flag = c;
    g = golden(o, x, y, c);
    exp_q.push_back({1'b0, g[W-1:0]});
    req_in = 1'b1;
    expl = 1 + carry_settle(o, x, y) + LOGW;
    // the stage starts once the previous result has precharged and been
    // released; count rising edges from that edge until the result is announced
    #1;
    while (!eval) begin
      @(posedge clk);
      #1;
    end
    lat = 1;
    while (!req_out) begin
      @(posedge clk);
      lat++;
      #1;
    end
    checks++;
    if (lat != expl) begin
      failures++;
      if (failures < 10) $display("%s a=%h b=%h latency %0d expected %0d", o.name(), x, y, lat, expl);
    end
    if (is_arith(o)) begin
      checks++;
      if (cout !== g[W] || cout_dr.t !== g[W] || cout_dr.f !== !g[W]) begin
        failures++;
        if (failures < 10) $display("%s a=%h b=%h carry %0b expected %0b", o.name(), x, y, cout, g[W]);
      end
      if (o inside {OP_ADD, OP_ADC, OP_SUB, OP_SBC, OP_RSB, OP_RSC, OP_CMP, OP_CMN}) begin
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
        lat_sum += lat; lat_n++;
      end
      if (carry_settle(o, x, y) == 1) n_early++;
      if (carry_settle(o, x, y) == W) n_full_ripple++;
      if (o inside {OP_ADC, OP_SBC, OP_RSC}) n_flag_cin++;
    end
    op_seen[o]++;
    while (!ack_in) @(negedge clk);
    req_in = 1'b0;
    a = $urandom; b = $urandom;   // operands may change once acknowledged
    op = alu_op_t'($urandom_range(0, 15)); c_flag = 1'($urandom_range(0, 1));
    while (ack_in) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // directed: full-length ripple, early completion, every function once
    issue(OP_ADD, '1, '0, 1'b0);
    issue(OP_ADD, 32'h0000_0001, '1, 1'b0);
    issue(OP_ADD, 32'h1234_5678, 32'h1234_5678, 1'b0);
    issue(OP_SUB, 32'h0000_0000, 32'h0000_0000, 1'b0);
    issue(OP_ADC, '1, '0, 1'b1);
    for (int o = 0; o < 16; o++) issue(alu_op_t'(o), $urandom, $urandom, 1'($urandom_range(0, 1)));
    // random traffic
    for (int n = 0; n < NOPS; n++) begin
      logic [W-1:0] x, y;
      x = $urandom; y = $urandom;
      case ($urandom_range(0, 5))
        0: y = ~x;                      // long propagate runs
        1: y = x ^ (32'hFFFF_FFFF >> $urandom_range(0, 31));
        default: ;
      endcase
      issue(alu_op_t'($urandom_range(0, 15)), x, y, 1'($urandom_range(0, 1)));
    end
    repeat (20) @(negedge clk);
    checks++; if (rx_count != NOPS + 21) failures++;
    checks++; if (exp_q.size() != 0) failures++;
    for (int o = 0; o < 16; o++) begin
      checks++;
      if (op_seen[o] == 0) begin failures++; $display("function %0d never ran", o); end
    end
    checks++; if (n_flag_cin == 0)    begin failures++; $display("no carry-in from flag"); end
    checks++; if (n_early == 0)       begin failures++; $display("no early completion"); end
    checks++; if (n_full_ripple == 0) begin failures++; $display("no full-length ripple"); end
    checks++; if (n_precharge < NOPS) begin failures++; $display("too few precharge phases"); end
    checks++; if (n_held == 0)        begin failures++; $display("receiver never held"); end
    $display("operations=%0d early=%0d full_ripple=%0d flag_cin=%0d precharges=%0d held=%0d",
             rx_count, n_early, n_full_ripple, n_flag_cin, n_precharge, n_held);
    $display("arithmetic latency (ticks, request to result): min=%0d max=%0d mean=%0.2f",
             lat_min, lat_max, real'(lat_sum) / lat_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
