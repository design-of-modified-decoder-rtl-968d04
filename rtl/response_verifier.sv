// response_verifier: order-independent response verifier.
//
// Each time the concurrent BIST unit reports a hit (rve), the m-bit response
// of the circuit under test is added into an m-bit accumulator (one full adder
// and one D flip-flop per output bit, carry out dropped). Because addition is
// commutative the signature does not depend on the order in which the vectors
// arrive, which is what monitoring of normal-mode inputs needs. On test_end
// the signature is compared with the expected one (golden) and the verdict is
// held: pass = 1 means a fault-free CUT. Accumulator compaction and the
// "1 = fault free" output follow the document; taking the expected signature
// from a port is this design's choice.
// Timing: sig updates on the edge where rve is high; pass and result_valid on
// the edge where test_end is high; clr clears all.
module response_verifier #(
  parameter int unsigned M_BITS = cbist_pkg::COLS
) (
  input  logic              clk,
  input  logic              rst_n,         // asynchronous, active low
  input  logic              clr,           // restart
  input  logic              rve,           // capture the response
  input  logic [M_BITS-1:0] resp,          // CUT output
  input  logic              test_end,      // evaluate the signature
  input  logic [M_BITS-1:0] golden,        // expected signature
  output logic [M_BITS-1:0] sig,           // accumulated signature
  output logic              result_valid,  // verdict available
  output logic              pass           // signature matched
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig          <= '0;
      result_valid <= 1'b0;
      pass         <= 1'b0;
    end else if (clr) begin
      sig          <= '0;
      result_valid <= 1'b0;
      pass         <= 1'b0;
    end else begin
      if (rve) sig <= sig + resp;
      if (test_end) begin
        result_valid <= 1'b1;
        pass         <= (sig == golden);
      end
    end
  end

endmodule
