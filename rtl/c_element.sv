// c_element: Muller C-element, the state-holding gate of the asynchronous ALU.
//
// The output copies the inputs when they agree and holds its value when they
// differ: z' = a&b | z&(a|b). A rising output therefore says both inputs are 1,
// a falling output that both are 0, which is what completion detection and the
// Muller pipeline rely on.
//
// Timing model: every state-holding element of this design is updated on the
// rising edge of clk, a free-running "gate delay" tick. One tick is one gate
// delay; the circuits built from this element are delay-insensitive, so their
// results do not depend on how many ticks a path takes. rst_n (asynchronous,
// active low) loads INIT; the paper states that all C-elements start at 0,
// which is the default.
module c_element #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic z
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      z <= INIT;
    else if (a == b) z <= a;
  end

endmodule
