// spare_control: memory wrapper that steers accesses to main or spare rows.
//
// While the power-up BIST owns the memory (bist_active), its physical row,
// write and data pass straight to the array. Otherwise the logical address of
// the system (or of the concurrent BIST test vector) is looked up in the
// repair table kept by the redundancy analysis: if a valid spare replaces that
// main row, the access goes to the spare row, else to the main row. Addresses
// beyond the main rows hold no word: the access is disabled, so reads return
// 0 and writes are dropped. Selecting between main and spare follows the
// document; doing it on the row index and the handling of unused addresses are
// this design's choices. Purely combinational.
module spare_control #(
  parameter int unsigned MAIN_ROWS  = cbist_pkg::MAIN_ROWS,
  parameter int unsigned SPARE_ROWS = cbist_pkg::SPARE_ROWS,
  parameter int unsigned ADDR_BITS  = cbist_pkg::N_BITS,
  parameter int unsigned COLS       = cbist_pkg::COLS,
  localparam int unsigned RB        = $clog2(MAIN_ROWS + SPARE_ROWS)
) (
  // power-up BIST side (physical rows)
  input  logic                                 bist_active,
  input  logic [RB-1:0]                        bist_row,
  input  logic                                 bist_we,
  input  logic [COLS-1:0]                      bist_wdata,
  // normal / concurrent-test side (logical address)
  input  logic [ADDR_BITS-1:0]                 addr,
  input  logic                                 we,
  input  logic [COLS-1:0]                      wdata,
  // repair table
  input  logic [SPARE_ROWS-1:0]                spare_used,
  input  logic [SPARE_ROWS-1:0][ADDR_BITS-1:0] spare_map,
  // to the memory array
  output logic                                 mem_en,
  output logic [RB-1:0]                        mem_row,
  output logic                                 mem_we,
  output logic [COLS-1:0]                      mem_wdata,
  output logic                                 repaired  // access went to a spare
);

  always_comb begin
    repaired = 1'b0;
    if (bist_active) begin
      mem_en    = 1'b1;
      mem_row   = bist_row;
      mem_we    = bist_we;
      mem_wdata = bist_wdata;
    end else begin
      mem_en    = (32'(addr) < MAIN_ROWS);
      mem_row   = RB'(addr);
      mem_we    = we;
      mem_wdata = wdata;
      for (int s = 0; s < SPARE_ROWS; s++) begin
        if (spare_used[s] && (spare_map[s] == addr) && !repaired) begin
          mem_row  = RB'(MAIN_ROWS + s);
          repaired = 1'b1;
        end
      end
    end
  end

endmodule
