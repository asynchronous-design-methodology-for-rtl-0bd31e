// completion_detector: tells when a whole dual-rail word is valid or empty.
//
// Each bit is reduced to "has data" by OR-ing its two rails. The W flags are
// then merged by a balanced tree of Muller C-elements, so done rises only when
// every bit holds a valid codeword and falls only when every bit has returned
// to empty; in between it holds. This is the standard dual-rail completion
// detector built from the paper's C-element and 4-phase dual-rail code; the
// tree shape is this design's choice.
//
// The tree is padded to a power of two by repeating bit 0 (a C-element whose
// two inputs are equal simply follows them). Each tree level is one tick, so
// done follows the last bit's change by $clog2(W) ticks; with W = 1 done is
// the plain OR of the two rails, as in the Muller pipeline of one bit.
module completion_detector
  import dr_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dr_bit_t [W-1:0] d,
  output logic          done
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 0;
  localparam int unsigned P      = 1 << LEVELS;

  // Heap-ordered tree: node 1 is the root, leaves are P .. 2P-1.
  logic [2*P-1:1] node;

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < W) begin : g_bit
      assign node[P+i] = d[i].t | d[i].f;
    end else begin : g_pad
      assign node[P+i] = d[0].t | d[0].f;
    end
  end

  for (genvar k = 1; k < P; k++) begin : g_tree
    c_element u_c (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (node[2*k]),
      .b    (node[2*k+1]),
      .z    (node[k])
    );
  end

  assign done    = node[1];

endmodule
