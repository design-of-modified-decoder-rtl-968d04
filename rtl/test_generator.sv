// test_generator: k-stage test generator (window counter).
//
// Holds the number of the window of 2^w vectors that the concurrent BIST unit
// currently monitors. When the logic module reports that every vector of the
// window has been seen (tge), it steps to the next window; after the last
// window it wraps to 0. `last` tells the logic module that the current window
// is the final one of the test. The document only says the test generator
// produces the windows; a binary counter is this design's choice.
// Timing: tg changes on the clock edge where tge is high; clr restarts at 0.
module test_generator #(
  parameter int unsigned K_BITS = cbist_pkg::K_BITS
) (
  input  logic              clk,
  input  logic              rst_n,  // asynchronous, active low
  input  logic              clr,    // synchronous restart
  input  logic              tge,    // advance to the next window
  output logic [K_BITS-1:0] tg,     // current window number
  output logic              last    // current window is the last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   tg <= '0;
    else if (clr) tg <= '0;
    else if (tge) tg <= tg + 1'b1;
  end

  always_comb last = (tg == {K_BITS{1'b1}});

endmodule
