// bisr_bist: power-up memory BIST of the self-repair scheme.
//
// After reset it owns the memory and tests the spare rows first, then the
// main rows, one row at a time with six accesses: write 0, read 0, write 1,
// read 1, write 0, read 0 (the row is left at 0). Reads are checked in the
// cycle they are made (the array reads asynchronously). On the first mismatch
// in a row the test pauses: err pulses for one cycle with the fault syndrome
// (spare flag, physical row, read XOR expected) and the BIST waits for
// Continue from the redundancy analysis, then goes on with the next row; the
// rest of a faulty row is skipped. When every row is done, `done` rises and
// the memory is released to the wrapper's normal path.
// Spare-then-main order, ERR/FS, the pause and Continue follow the document;
// the write/read pattern is this design's choice, after the document's "zero
// first, then one" memory test.
// Timing: a fault-free run takes 6 * (MAIN_ROWS + SPARE_ROWS) cycles.
module bisr_bist
#(
  parameter int unsigned MAIN_ROWS  = cbist_pkg::MAIN_ROWS,
  parameter int unsigned SPARE_ROWS = cbist_pkg::SPARE_ROWS,
  parameter int unsigned COLS       = cbist_pkg::COLS,
  localparam int unsigned ROWS      = MAIN_ROWS + SPARE_ROWS,
  localparam int unsigned RB        = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,   // asynchronous, active low; test starts after it
  input  logic [COLS-1:0] rdata,   // memory read data (same cycle)
  input  logic            cont,    // Continue from the redundancy analysis
  output logic            active,  // BIST owns the memory
  output logic [RB-1:0]   row,     // physical row accessed
  output logic            we,      // write
  output logic [COLS-1:0] wdata,   // write data
  output logic            err,     // ERR: a faulty row was found
  output cbist_pkg::fault_syndrome_t fs,      // FS: which row, which bits
  output logic            done     // test and repair finished
);

  typedef enum logic [1:0] {ST_RUN, ST_ERR, ST_WAIT, ST_DONE} state_t;

  state_t          state;
  logic [RB-1:0]   step;      // position in the test order, 0 .. ROWS-1
  logic [2:0]      op;        // access within the row, 0 .. 5
  logic [COLS-1:0] expect_d;  // pattern of the current access
  logic            is_spare;
  logic            mismatch;
  logic            last_row;

  // Test order: spare rows first, then main rows.
  always_comb begin
    is_spare = (32'(step) < SPARE_ROWS);
    row      = is_spare ? RB'(32'(step) + MAIN_ROWS) : RB'(32'(step) - SPARE_ROWS);
    last_row = (32'(step) == ROWS - 1);
    expect_d = (op == 3'd2 || op == 3'd3) ? '1 : '0;
    active   = (state != ST_DONE);
    we       = (state == ST_RUN) && !op[0];
    wdata    = expect_d;
    mismatch = (state == ST_RUN) && op[0] && (rdata != expect_d);
    err      = (state == ST_ERR);
    done     = (state == ST_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_RUN;
      step  <= '0;
      op    <= '0;
      fs    <= '0;
    end else begin
      unique case (state)
        ST_RUN: begin
          if (mismatch) begin
            fs    <= '{spare: is_spare, row: row, bits: rdata ^ expect_d};
            state <= ST_ERR;
          end else if (op == 3'd5) begin
            op <= '0;
            if (last_row) state <= ST_DONE;
            else          step  <= step + 1'b1;
          end else begin
            op <= op + 1'b1;
          end
        end
        ST_ERR: state <= ST_WAIT;
        ST_WAIT: begin
          if (cont) begin
            op <= '0;
            if (last_row) state <= ST_DONE;
            else begin
              step  <= step + 1'b1;
              state <= ST_RUN;
            end
          end
        end
        ST_DONE: ;
        default: state <= ST_DONE;
      endcase
    end
  end

  // ERR is a one-cycle pulse, and the memory is left alone once done.
  a_err_pulse: assert property (@(posedge clk) disable iff (!rst_n) err |=> !err)
    else $error("bisr_bist: ERR longer than one cycle");
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !we && !active)
    else $error("bisr_bist: access after done");

endmodule
