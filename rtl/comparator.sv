// comparator: k-stage equality comparator of the concurrent BIST unit.
//
// Compares the k high-order bits of the vector applied to the circuit under
// test with the state of the test generator (the number of the window being
// monitored). A match means the vector belongs to the current window and
// enables the modified decoder. Following the document, the comparator has k
// stages fed by the vector and the test generator; the enable input, which
// restricts monitoring to read accesses, is this design's addition.
// Purely combinational.
module comparator #(
  parameter int unsigned K_BITS = cbist_pkg::K_BITS
) (
  input  logic              en,      // compare in this cycle
  input  logic [K_BITS-1:0] vec_hi,  // high-order k bits of the CUT input
  input  logic [K_BITS-1:0] tg,      // test generator state
  output logic              match    // vector lies in the current window
);

  always_comb match = en && (vec_hi == tg);

endmodule
