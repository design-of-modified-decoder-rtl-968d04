// cbist_pkg: sizes and shared types of the concurrent BIST / BISR memory design.
//
// The circuit under test is a 10-row by 10-column memory (ten words of ten
// bits); these two numbers follow the document. Everything else here is this
// design's choice: the input vector monitored by the concurrent BIST unit is
// the 4-bit memory address (n = 4), split into k = 2 high-order window bits and
// w = 2 low-order position bits, so one window holds W = 4 vectors ("00", "01",
// "10", "11"); two spare rows are available for repair.
package cbist_pkg;

  parameter int unsigned MAIN_ROWS  = 10;  // rows of the memory under test
  parameter int unsigned COLS       = 10;  // columns (bits per word)
  parameter int unsigned SPARE_ROWS = 2;   // redundant rows for self-repair
  parameter int unsigned W_BITS     = 2;   // w: position bits inside a window
  parameter int unsigned K_BITS     = 2;   // k: window-number bits
  parameter int unsigned N_BITS     = W_BITS + K_BITS;  // n = w + k, address width

  // Physical rows: main rows first, then spares.
  parameter int unsigned PHYS_ROWS  = MAIN_ROWS + SPARE_ROWS;
  parameter int unsigned PHYS_BITS  = $clog2(PHYS_ROWS);

  // Fault syndrome (FS) sent from the memory BIST to the redundancy analysis.
  typedef struct packed {
    logic                 spare;  // the faulty row is a spare row
    logic [PHYS_BITS-1:0] row;    // physical row index
    logic [COLS-1:0]      bits;   // read data XOR expected data
  } fault_syndrome_t;

endpackage
