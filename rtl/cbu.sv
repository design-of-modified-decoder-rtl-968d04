// cbu: concurrent BIST unit.
//
// Watches every vector d applied to the memory under test. The k high-order
// bits are compared with the test generator (window number); on a match the
// modified decoder raises the word line of the w low-order bits, and the logic
// module decides whether the vector is a hit (first arrival in this window).
// A hit raises rve for the response verifier; the last hit of a window raises
// tge, which steps the test generator. After the last window, done rises and
// test_end pulses for one cycle.
//
// In test mode the CBU also supplies the vector TG[n:1] = {window, first
// unseen position}, which is a hit in every cycle.
//
// The division into comparator, test generator, modified decoder and logic
// module follows the document. vec_valid (only read accesses are monitored,
// since a write returns no response) is this design's addition.
// Timing: rve, tge and tg_vec are combinational in the cycle of the vector;
// state changes on the rising clock edge.
module cbu #(
  parameter int unsigned W_BITS = cbist_pkg::W_BITS,
  parameter int unsigned K_BITS = cbist_pkg::K_BITS,
  localparam int unsigned N_BITS = W_BITS + K_BITS
) (
  input  logic              clk,
  input  logic              rst_n,      // asynchronous, active low
  input  logic              clr,        // restart the concurrent test
  input  logic [N_BITS-1:0] d,          // vector applied to the CUT
  input  logic              vec_valid,  // d is a monitored read access
  output logic [N_BITS-1:0] tg_vec,     // TG[n:1], test-mode vector
  output logic              rve,        // response verifier enable
  output logic              tge,        // window advance
  output logic              done,       // test complete
  output logic              test_end    // one-cycle strobe after completion
);

  logic [K_BITS-1:0]      tg;
  logic                   last;
  logic                   match;
  logic [2**W_BITS-1:0]   wl;
  logic [W_BITS-1:0]      free_idx;
  logic [W_BITS-1:0]      hits;

  comparator #(.K_BITS(K_BITS)) u_cmp (
    .en    (vec_valid),
    .vec_hi(d[N_BITS-1:W_BITS]),
    .tg    (tg),
    .match (match)
  );

  test_generator #(.K_BITS(K_BITS)) u_tg (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .tge  (tge),
    .tg   (tg),
    .last (last)
  );

  modified_decoder #(.W_BITS(W_BITS)) u_dec (
    .en  (match),
    .addr(d[W_BITS-1:0]),
    .wl  (wl)
  );

  logic_module #(.W_BITS(W_BITS)) u_lm (
    .clk        (clk),
    .rst_n      (rst_n),
    .clr        (clr),
    .wl         (wl),
    .last_window(last),
    .rve        (rve),
    .tge        (tge),
    .free_idx   (free_idx),
    .hits       (hits),
    .done       (done),
    .test_end   (test_end)
  );

  always_comb tg_vec = {tg, free_idx};

endmodule
