// dr_protocol_checker: watches a dual-rail word for breaches of the 4-phase
// dual-rail code.
//
// The code allows each bit to move only between empty {0,0} and one of the
// valid words {1,0} (0) and {0,1} (1); the word {1,1} is never used, and a
// bit may not go from one valid word straight to the other. The checker keeps
// the previous value of every bit (one tick of history) and raises
// bad_code when any bit shows {1,1} and bad_step when any bit changed from
// one valid word to the other. err is sticky until reset. The rules are the
// paper's; a checker block is this design's way to enforce them in
// hardware and in simulation.
module dr_protocol_checker
  import dr_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dr_bit_t [W-1:0] d,
  output logic            bad_code,
  output logic            bad_step,
  output logic            err
);

  dr_bit_t [W-1:0] prev;

  always_comb begin
    bad_code = 1'b0;
    bad_step = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (d[i].t && d[i].f) bad_code = 1'b1;
      if (dr_is_valid(prev[i]) && dr_is_valid(d[i]) && (prev[i] != d[i])) bad_step = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      err  <= 1'b0;
    end else begin
      prev <= d;
      if (bad_code || bad_step) err <= 1'b1;
    end
  end

endmodule
