// logic_module: window bookkeeping of the concurrent BIST unit.
//
// One SRAM-like cell per vector of the current window records whether that
// vector has already reached the circuit under test. The word line raised by
// the modified decoder selects a cell; the sense amplifier reads it. If the
// cell is still empty the vector is a hit: the cell is written to 1 and rve
// lets the response verifier capture the CUT output in the same cycle. A
// w-stage counter counts the hits of the window; when it overflows (the 2^w-th
// hit) tge advances the test generator and all cells are cleared on that same
// clock edge. If that happens in the last window the whole test set has been
// applied: two D flip-flops hold the end-of-test flag and its delayed copy,
// and test_end is a one-cycle pulse the cycle after the flag rises. After the
// end of the test no further hits are issued until clr.
//
// In test mode the unit must produce vectors itself: free_idx is the lowest
// cell of the window still empty, so the vector {window, free_idx} is always a
// hit and a full test from an empty window takes 2^n cycles.
//
// The cells, sense amplifier, two flip-flops and w-stage counter are named by
// the document; how they are wired here (cells as flip-flops, the sense
// amplifier as an AND-OR read, the role of the two flip-flops, free_idx for
// the test-mode vector) is this design's choice.
module logic_module #(
  parameter int unsigned W_BITS = cbist_pkg::W_BITS,
  localparam int unsigned W     = 2**W_BITS
) (
  input  logic              clk,
  input  logic              rst_n,        // asynchronous, active low
  input  logic              clr,          // synchronous restart of the test
  input  logic [W-1:0]      wl,           // word lines from the decoder
  input  logic              last_window,  // test generator is at its last window
  output logic              rve,          // hit: response verifier enable
  output logic              tge,          // window complete: test generator enable
  output logic [W_BITS-1:0] free_idx,     // lowest empty cell
  output logic [W_BITS-1:0] hits,         // w-stage hit counter
  output logic              done,         // every vector of the test applied
  output logic              test_end      // one-cycle pulse after done rises
);

  logic [W-1:0] cells;     // SRAM-like cells, 1 = vector already seen
  logic         sense;     // sense amplifier output: selected cell content
  logic         selected;  // some word line is active
  logic         done_q;    // second flip-flop: delayed end-of-test flag

  always_comb begin
    sense    = |(wl & cells);
    selected = |wl;
    rve      = selected && !sense && !done;
    tge      = rve && (hits == W_BITS'(W - 1));
  end

  // Lowest empty cell (priority encoder), test-mode vector low bits.
  always_comb begin
    free_idx = '0;
    for (int i = W - 1; i >= 0; i--) begin
      if (!cells[i]) free_idx = W_BITS'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells  <= '0;
      hits   <= '0;
      done   <= 1'b0;
      done_q <= 1'b0;
    end else if (clr) begin
      cells  <= '0;
      hits   <= '0;
      done   <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= done;
      if (tge) begin
        cells <= '0;          // window complete: clear every cell
        hits  <= '0;          // counter overflows
        if (last_window) done <= 1'b1;
      end else if (rve) begin
        cells <= cells | wl;  // write 1 into the selected cell
        hits  <= hits + 1'b1;
      end
    end
  end

  always_comb test_end = done && !done_q;

  // Rules of the hit / window protocol.
  a_wl_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wl))
    else $error("logic_module: several word lines at once");
  a_tge_is_hit: assert property (@(posedge clk) disable iff (!rst_n) tge |-> rve)
    else $error("logic_module: window advance without a hit");
  a_end_once: assert property (@(posedge clk) disable iff (!rst_n) test_end |=> !test_end)
    else $error("logic_module: test_end longer than one cycle");

endmodule
