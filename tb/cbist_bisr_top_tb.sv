// cbist_bisr_top_tb: end-to-end run of the self-repairing memory with
// concurrent BIST, at the design's default sizes.
//
//  1. Power-up with a stuck-at bit in spare row 11 and one in main row 4:
//     the BIST must report both, the spare must be marked bad and main row 4
//     mapped to spare row 10, with no repair failure.
//  2. Normal mode: the system writes every row (writes are not monitored),
//     then reads random addresses; every read must return the written data
//     (row 4 from its spare) and the concurrent test must finish with a pass,
//     writes during the test rewriting the stored word so that it stays valid;
//     its signature being the sum of the 16 words (addresses past row 9 read 0).
//  3. Test mode from a cleared test: done after exactly 2^n = 16 cycles, pass.
//  4. Mixed: a few normal reads, then a switch to test mode finishes the test.
//  5. A stuck bit appearing in main row 2 after repair makes the test fail.
//  6. Power-up with three faulty main rows: two spares, so repair_fail.
// Each mechanism is counted and must occur at least once.
module cbist_bisr_top_tb;
  import cbist_pkg::*;

  logic                  clk = 0, rst_n = 0;
  logic                  tn = 0, a_we = 0, ctest_clr = 0;
  logic [N_BITS-1:0]     a_addr = '0;
  logic [COLS-1:0]       a_wdata = '0, golden_sig = '0;
  logic [COLS-1:0]       dout, signature;
  logic                  rve, tge, ctest_done, ctest_valid, ctest_pass;
  logic                  bisr_done, bisr_err, repair_fail, repaired;
  logic [SPARE_ROWS-1:0] spare_used, spare_bad;

  int checks = 0, failures = 0;
  logic [COLS-1:0] model [2**N_BITS];  // expected word per logical address

  // mechanism counters
  int n_hit = 0, n_dup = 0, n_outside = 0, n_write = 0, n_tge = 0, n_test_hit = 0;
  int n_mode_switch = 0, n_pass = 0, n_detect = 0, n_err = 0, n_spare_bad = 0;
  int n_repair = 0, n_repaired_access = 0, n_repair_fail = 0;

  cbist_bisr_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n && bisr_err) n_err++;

  function automatic logic [COLS-1:0] golden_of_model();
    logic [COLS-1:0] s = '0;
    for (int i = 0; i < 2**N_BITS; i++) s += model[i];
    return s;
  endfunction

  task automatic power_up(output int cycles);
    rst_n = 0; tn = 0; a_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (!bisr_done && cycles < 1000) begin @(negedge clk); cycles++; end
    chk(bisr_done, "power-up repair did not finish");
  endtask

  // Restart the concurrent test; mode is the T/N value from the restart on.
  task automatic clear_test(bit mode);
    @(negedge clk); ctest_clr = 1; tn = mode; a_we = 0;
    if (mode && !tn) n_mode_switch++;
    @(negedge clk); ctest_clr = 0;
  endtask

  // Test-mode cycles: every one must be a hit until the test is done.
  always @(posedge clk) begin
    if (rst_n && bisr_done && tn && !ctest_clr) begin
      if (rve) n_test_hit++;
      else if (!ctest_done) begin
        checks++; failures++;
        $display("FAIL test-mode cycle without a hit");
      end
    end
    if (rst_n && tge) n_tge++;
  end

  // Clock cycles until the concurrent test is done, in test mode.
  task automatic run_test_mode(output int cycles);
    if (!tn) n_mode_switch++;
    tn = 1; a_we = 1;  // the write request must be blocked in test mode
    cycles = 0;
    while (!ctest_done && cycles < 100) begin @(posedge clk); #1; cycles++; end
  endtask

  // One cycle of system traffic; checks read data against the model.
  // same_data: a write that stores the word already there (keeps the
  // signature valid while exercising unmonitored write cycles)
  task automatic normal_access(bit write, int addr, bit same_data = 0);
    @(negedge clk);
    tn = 0; a_we = write; a_addr = N_BITS'(addr);
    a_wdata = same_data ? model[addr] : COLS'($urandom);
    #1;
    if (write) begin
      n_write++;
      chk(!rve, "a write cycle was captured");
      if (addr < MAIN_ROWS) model[addr] = a_wdata;
    end else begin
      chk(dout == model[addr], $sformatf("read addr %0d gave %h expected %h", addr, dout, model[addr]));
      if (rve) n_hit++;
      else if (!ctest_done && addr / 2**W_BITS == int'(dut.u_cbu.tg)) n_dup++;
      else n_outside++;
    end
    if (repaired) n_repaired_access++;
  endtask

  task automatic finish_and_judge(bit expect_pass, string what);
    int guard = 0;
    while (!ctest_valid && guard < 10) begin @(negedge clk); tn = 0; a_we = 0; guard++; end
    chk(ctest_valid, {what, ": no verdict"});
    chk(ctest_pass == expect_pass, $sformatf("%s: pass=%0d expected %0d (sig %h golden %h)",
                                             what, ctest_pass, expect_pass, signature, golden_sig));
    if (ctest_valid && ctest_pass) n_pass++;
    if (ctest_valid && !ctest_pass && !expect_pass) n_detect++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    // ---- 1. power-up test and repair with two defects
    force dut.u_mem.mem[11][3] = 1'b1;  // spare row 11, bit 3 stuck at 1
    force dut.u_mem.mem[4][7]  = 1'b0;  // main row 4, bit 7 stuck at 0
    power_up(cycles);
    chk(n_err == 2, $sformatf("%0d faults reported, expected 2", n_err));
    chk(spare_bad == 2'b10, $sformatf("spare_bad=%b", spare_bad));
    chk(spare_used == 2'b01 && dut.spare_map[0] == 4, $sformatf("spare_used=%b", spare_used));
    chk(!repair_fail, "repair_fail with a spare available");
    if (spare_bad != 0) n_spare_bad++;
    if (spare_used != 0) n_repair++;
    // 6 cycles per row; a faulty row stops at its failing read, then ERR and Continue
    // take a cycle each: row 11 fails at the 2nd access (4 cycles), row 4 at the 4th (6).
    chk(cycles == 6 * PHYS_ROWS - 2, $sformatf("power-up took %0d cycles, expected %0d", cycles, 6 * PHYS_ROWS - 2));
    for (int i = 0; i < 2**N_BITS; i++) model[i] = '0;

    // ---- 2. normal operation: fill memory, then random reads until the test ends
    for (int r = 0; r < 2**N_BITS; r++) normal_access(1, r);
    golden_sig = golden_of_model();
    clear_test(0);
    cycles = 0;
    while (!ctest_done && cycles < 5000) begin
      normal_access($urandom_range(0, 9) == 0, $urandom_range(0, 2**N_BITS - 1), 1);
      cycles++;
    end
    chk(ctest_done, "normal-mode test did not finish");
    finish_and_judge(1, "normal mode");

    // ---- 3. test mode from a cleared test: 2^n cycles
    clear_test(1);
    run_test_mode(cycles);
    chk(cycles == 2**N_BITS, $sformatf("test mode took %0d cycles, expected %0d", cycles, 2**N_BITS));
    finish_and_judge(1, "test mode");
    for (int r = 0; r < MAIN_ROWS; r++) normal_access(0, r);  // contents unchanged by test mode

    // ---- 4. mixed: some normal reads, then switch to test mode
    clear_test(0);
    for (int i = 0; i < 6; i++) normal_access(0, $urandom_range(0, 2**N_BITS - 1));
    @(negedge clk);
    run_test_mode(cycles);
    chk(ctest_done && cycles <= 2**N_BITS, $sformatf("mixed test: %0d test-mode cycles", cycles));
    finish_and_judge(1, "mixed");

    // ---- 5. a defect after repair is detected by the concurrent test
    force dut.u_mem.mem[2][0] = ~model[2][0];
    clear_test(1);
    run_test_mode(cycles);
    finish_and_judge(0, "defect after repair");
    release dut.u_mem.mem[2][0];

    // ---- 6. power-up with more faulty rows than spares
    release dut.u_mem.mem[11][3];
    release dut.u_mem.mem[4][7];
    force dut.u_mem.mem[1][0] = 1'b1;
    force dut.u_mem.mem[5][5] = 1'b1;
    force dut.u_mem.mem[8][9] = 1'b0;
    n_err = 0;
    power_up(cycles);
    chk(n_err == 3, $sformatf("%0d faults reported, expected 3", n_err));
    chk(repair_fail, "repair_fail not set");
    chk(spare_used == 2'b11 && dut.spare_map[0] == 1 && dut.spare_map[1] == 5, "spares for rows 1 and 5");
    if (repair_fail) n_repair_fail++;
    release dut.u_mem.mem[1][0];
    release dut.u_mem.mem[5][5];
    release dut.u_mem.mem[8][9];

    // ---- every mechanism happened
    $display("hits %0d, repeats %0d, outside window %0d, writes %0d, window advances %0d",
             n_hit, n_dup, n_outside, n_write, n_tge);
    $display("test-mode hits %0d, mode switches %0d, passes %0d, detections %0d",
             n_test_hit, n_mode_switch, n_pass, n_detect);
    $display("BIST reports %0d, spares marked bad %0d, repairs %0d, repaired accesses %0d, repair failures %0d",
             n_err, n_spare_bad, n_repair, n_repaired_access, n_repair_fail);
    chk(n_hit > 0, "no normal-mode hit");
    chk(n_dup > 0, "no repeated vector");
    chk(n_outside > 0, "no vector outside the window");
    chk(n_write > 0, "no write");
    chk(n_tge > 0, "no window advance");
    chk(n_test_hit > 0, "no test-mode hit");
    chk(n_mode_switch > 0, "no mode switch");
    chk(n_pass > 0, "no passing test");
    chk(n_detect > 0, "no detected defect");
    chk(n_spare_bad > 0, "no faulty spare marked");
    chk(n_repair > 0, "no repair");
    chk(n_repaired_access > 0, "no access to a spare row");
    chk(n_repair_fail > 0, "no repair failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
