// spare_control_tb: random repair tables, modes and addresses; the row sent
// to the memory, its enable, write and data are compared with a reference
// lookup: BIST accesses pass unchanged, repaired main rows go to their spare,
// other main rows go to themselves, and addresses past the main rows are
// disabled.
module spare_control_tb;
  import cbist_pkg::*;
  logic                                  bist_active, bist_we, we;
  logic [PHYS_BITS-1:0]                  bist_row;
  logic [COLS-1:0]                       bist_wdata, wdata;
  logic [N_BITS-1:0]                     addr;
  logic [SPARE_ROWS-1:0]                 spare_used;
  logic [SPARE_ROWS-1:0][N_BITS-1:0]     spare_map;
  logic                                  mem_en, mem_we, repaired;
  logic [PHYS_BITS-1:0]                  mem_row;
  logic [COLS-1:0]                       mem_wdata;
  int checks = 0, failures = 0, n_repaired = 0;

  spare_control dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int exp_row; bit exp_en, exp_we, exp_rep;
      logic [COLS-1:0] exp_wd;
      bist_active = ($urandom_range(0, 3) == 0);
      bist_row = PHYS_BITS'($urandom_range(0, PHYS_ROWS - 1));
      bist_we = 1'($urandom); bist_wdata = COLS'($urandom);
      addr = N_BITS'($urandom); we = 1'($urandom); wdata = COLS'($urandom);
      spare_used = SPARE_ROWS'($urandom);
      for (int s = 0; s < SPARE_ROWS; s++)
        spare_map[s] = ($urandom_range(0, 1) == 0) ? addr : N_BITS'($urandom_range(0, MAIN_ROWS - 1));
      if (bist_active) begin
        exp_en = 1; exp_row = bist_row; exp_we = bist_we; exp_wd = bist_wdata; exp_rep = 0;
      end else begin
        exp_en = (addr < MAIN_ROWS); exp_row = addr; exp_we = we; exp_wd = wdata; exp_rep = 0;
        for (int s = SPARE_ROWS - 1; s >= 0; s--)
          if (spare_used[s] && spare_map[s] == addr) begin exp_row = MAIN_ROWS + s; exp_rep = 1; end
      end
      #1;
      checks++;
      if (exp_rep) n_repaired++;
      if (mem_en !== exp_en || (exp_en && mem_row !== PHYS_BITS'(exp_row)) || mem_we !== exp_we
          || mem_wdata !== exp_wd || repaired !== exp_rep) begin
        failures++;
        $display("FAIL bist=%0d addr=%0d used=%b map=%p row=%0d exp %0d en=%0d", bist_active, addr,
                 spare_used, spare_map, mem_row, exp_row, mem_en);
      end
    end
    checks++;
    if (n_repaired == 0) begin failures++; $display("FAIL no repaired access generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
