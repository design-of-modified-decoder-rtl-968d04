// memory_array: the memory under test with its spare rows.
//
// MAIN_ROWS words of COLS bits (10 x 10, as in the document) followed by
// SPARE_ROWS spare words used for self-repair, addressed by physical row.
// Single port: a write happens on the rising clock edge when en and we are
// high; the read is asynchronous, so rdata shows the addressed word in the same
// cycle, and is 0 when en is low (no such row). The contents have no reset,
// like an SRAM. The number of spare rows and the port timing are this
// design's choices.
module memory_array #(
  parameter int unsigned MAIN_ROWS  = cbist_pkg::MAIN_ROWS,
  parameter int unsigned SPARE_ROWS = cbist_pkg::SPARE_ROWS,
  parameter int unsigned COLS       = cbist_pkg::COLS,
  localparam int unsigned ROWS      = MAIN_ROWS + SPARE_ROWS,
  localparam int unsigned RB        = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            en,     // row index is valid
  input  logic [RB-1:0]   row,    // physical row
  input  logic            we,     // write
  input  logic [COLS-1:0] wdata,
  output logic [COLS-1:0] rdata
);

  logic [ROWS-1:0][COLS-1:0] mem;

  always_ff @(posedge clk) begin
    if (en && we && (row < RB'(ROWS))) mem[row] <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (en && (row < RB'(ROWS))) rdata = mem[row];
  end

endmodule
