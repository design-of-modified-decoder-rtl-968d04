// cbist_bisr_top: self-repairing 10 x 10 memory with concurrent BIST.
//
// At power-up the memory BIST (bisr_bist) owns the memory: it tests the spare
// rows, then the main rows, and the redundancy analysis (bira) marks faulty
// spares and maps each faulty main row onto a good spare. The wrapper
// (spare_control) then steers every access through that repair table.
//
// From then on the memory is tested concurrently with its normal use. The
// T/N multiplexer applies either the system's address A (normal mode) or the
// test vector TG of the concurrent BIST unit (test mode). The CBU watches
// every read address: the first read of each address of the current window of
// 2^w addresses is a hit, and the response verifier adds the data read to its
// signature. When all 2^n addresses have been read (in any order, in either
// mode) the signature is compared with golden_sig and ctest_pass is set for a
// fault-free memory. In test mode every cycle is a hit, so a test from scratch
// ends in 2^n cycles; ctest_clr starts a new test.
//
// The structure (MUX, CBU, RV, spare control hardware, spare cells, BIST and
// BIRA) follows the document; the address as the monitored vector, the
// golden-signature port and holding the concurrent test until the power-up
// repair has finished are this design's choices.
// Timing: dout is the asynchronous read of the applied address; all state
// changes on the rising edge of clk; rst_n is asynchronous, active low.
module cbist_bisr_top
  import cbist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // system side
  input  logic              tn,           // T/N: 0 normal, 1 test
  input  logic [N_BITS-1:0] a_addr,       // normal input vector A
  input  logic              a_we,         // normal write request
  input  logic [COLS-1:0]   a_wdata,      // normal write data
  output logic [COLS-1:0]   dout,         // memory output
  // concurrent BIST
  input  logic              ctest_clr,    // restart the concurrent test
  input  logic [COLS-1:0]   golden_sig,   // expected signature
  output logic              rve,          // a hit was captured this cycle
  output logic              tge,          // a window completed this cycle
  output logic              ctest_done,   // all vectors applied
  output logic              ctest_valid,  // verdict available
  output logic              ctest_pass,   // signature matched
  output logic [COLS-1:0]   signature,    // current signature
  // self-repair
  output logic              bisr_done,    // power-up test and repair finished
  output logic              bisr_err,     // ERR pulse of the power-up BIST
  output logic              repair_fail,  // a faulty row could not be replaced
  output logic [SPARE_ROWS-1:0] spare_used,
  output logic [SPARE_ROWS-1:0] spare_bad,
  output logic              repaired      // current access uses a spare row
);

  // T/N multiplexer
  logic [N_BITS-1:0] tg_vec, d;
  logic              d_we;

  tn_mux #(.N_BITS(N_BITS)) u_mux (
    .tn  (tn),
    .a   (a_addr),
    .a_we(a_we && bisr_done),
    .tg  (tg_vec),
    .d   (d),
    .d_we(d_we)
  );

  // Concurrent BIST unit, held cleared until the memory is repaired.
  logic cbu_clr, test_end;
  always_comb cbu_clr = ctest_clr || !bisr_done;

  cbu #(.W_BITS(W_BITS), .K_BITS(K_BITS)) u_cbu (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (cbu_clr),
    .d        (d),
    .vec_valid(bisr_done && !d_we),
    .tg_vec   (tg_vec),
    .rve      (rve),
    .tge      (tge),
    .done     (ctest_done),
    .test_end (test_end)
  );

  // Power-up BIST and redundancy analysis
  logic                          bist_active, bist_we, cont;
  logic [PHYS_BITS-1:0]          bist_row;
  logic [COLS-1:0]               bist_wdata;
  fault_syndrome_t               fs;
  logic [SPARE_ROWS-1:0][N_BITS-1:0] spare_map;

  bisr_bist u_bist (
    .clk   (clk),
    .rst_n (rst_n),
    .rdata (dout),
    .cont  (cont),
    .active(bist_active),
    .row   (bist_row),
    .we    (bist_we),
    .wdata (bist_wdata),
    .err   (bisr_err),
    .fs    (fs),
    .done  (bisr_done)
  );

  bira u_bira (
    .clk        (clk),
    .rst_n      (rst_n),
    .err        (bisr_err),
    .fs         (fs),
    .cont       (cont),
    .spare_used (spare_used),
    .spare_bad  (spare_bad),
    .spare_map  (spare_map),
    .repair_fail(repair_fail)
  );

  // Spare control wrapper and memory (main rows + spare cells)
  logic                 mem_en, mem_we;
  logic [PHYS_BITS-1:0] mem_row;
  logic [COLS-1:0]      mem_wdata;

  spare_control u_spare (
    .bist_active(bist_active),
    .bist_row   (bist_row),
    .bist_we    (bist_we),
    .bist_wdata (bist_wdata),
    .addr       (d),
    .we         (d_we),
    .wdata      (a_wdata),
    .spare_used (spare_used),
    .spare_map  (spare_map),
    .mem_en     (mem_en),
    .mem_row    (mem_row),
    .mem_we     (mem_we),
    .mem_wdata  (mem_wdata),
    .repaired   (repaired)
  );

  memory_array u_mem (
    .clk  (clk),
    .en   (mem_en),
    .row  (mem_row),
    .we   (mem_we),
    .wdata(mem_wdata),
    .rdata(dout)
  );

  // Response verifier
  response_verifier #(.M_BITS(COLS)) u_rv (
    .clk         (clk),
    .rst_n       (rst_n),
    .clr         (cbu_clr),
    .rve         (rve),
    .resp        (dout),
    .test_end    (test_end),
    .golden      (golden_sig),
    .sig         (signature),
    .result_valid(ctest_valid),
    .pass        (ctest_pass)
  );

  // The system cannot write the memory in test mode or during the power-up test.
  a_no_test_write: assert property (@(posedge clk) disable iff (!rst_n) (tn || !bisr_done) |-> !d_we)
    else $error("cbist_bisr_top: write reached the memory in test mode");

endmodule
