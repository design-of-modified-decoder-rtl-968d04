// tn_mux: T/N input multiplexer in front of the circuit under test.
//
// In normal mode (tn = 0) the memory receives the system's vector A and its
// write request; in test mode (tn = 1) it receives the test vector TG from the
// concurrent BIST unit, and writes are blocked because test vectors are read
// accesses. The mode select follows the document; blocking writes in test mode
// is this design's choice. Purely combinational.
module tn_mux #(
  parameter int unsigned N_BITS = cbist_pkg::N_BITS
) (
  input  logic              tn,    // 0: normal, 1: test
  input  logic [N_BITS-1:0] a,     // normal input vector A
  input  logic              a_we,  // normal write request
  input  logic [N_BITS-1:0] tg,    // test vector TG from the CBU
  output logic [N_BITS-1:0] d,     // vector applied to the CUT
  output logic              d_we   // write enable applied to the CUT
);

  always_comb begin
    d    = tn ? tg : a;
    d_we = !tn && a_we;
  end

endmodule
