// cbist_workload_tb: the evaluation runs of the design, on the full top at
// its default sizes.
//
//  1. Zero-filled memory. After the power-up test every word holds 0, so the
//     expected signature is 0. The system reads the addresses in order, each
//     window's positions 00, 01, 10, 11 in turn; every read is a hit and the
//     test ends after exactly 16 reads with a pass.
//  2. The same memory with one bit stuck at 1 (row 6, bit 0, appearing after
//     the power-up repair): the output differs from the stored 0 and the test
//     must fail.
//  3. Concurrent test latency (CTL): the mean number of normal-mode cycles to
//     complete a test when the system reads uniformly random addresses. A
//     window of W = 2^w vectors needs on average W * H(W) in-window reads
//     (coupon collecting, H = harmonic number), and a random read falls in the
//     window with probability 2^-k, so CTL = 2^n * H(2^w) = 16 * 25/12 = 33.3
//     cycles per window, 133.3 for the 4 windows. The measured mean over
//     RUNS tests must lie within 10 % of that.
module cbist_workload_tb;
  import cbist_pkg::*;

  localparam int RUNS = 300;

  logic                  clk = 0, rst_n = 0;
  logic                  tn = 0, a_we = 0, ctest_clr = 0;
  logic [N_BITS-1:0]     a_addr = '0;
  logic [COLS-1:0]       a_wdata = '0, golden_sig = '0;
  logic [COLS-1:0]       dout, signature;
  logic                  rve, tge, ctest_done, ctest_valid, ctest_pass;
  logic                  bisr_done, bisr_err, repair_fail, repaired;
  logic [SPARE_ROWS-1:0] spare_used, spare_bad;
  int checks = 0, failures = 0;

  cbist_bisr_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic clear_test();
    @(negedge clk); ctest_clr = 1; a_we = 1;  // no read while clearing
    @(negedge clk); ctest_clr = 0;
  endtask

  task automatic wait_verdict();
    int guard = 0;
    a_we = 1;
    while (!ctest_valid && guard < 10) begin @(negedge clk); guard++; end
    chk(ctest_valid, "no verdict");
  endtask

  // Reads the 16 addresses in order; returns how many were hits.
  task automatic ordered_reads(output int hits);
    hits = 0;
    for (int v = 0; v < 2**N_BITS; v++) begin
      @(negedge clk);
      a_we = 0; a_addr = N_BITS'(v);
      #1;
      if (rve) hits++;
    end
    @(negedge clk); a_we = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits, cycles;
    longint total;
    real mean, expect_ctl;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!bisr_done) @(negedge clk);
    chk(!repair_fail && spare_used == 0, "fault-free memory was repaired");

    // 1. zero-filled memory, vectors in order
    golden_sig = '0;
    clear_test();
    ordered_reads(hits);
    chk(hits == 2**N_BITS, $sformatf("%0d of 16 ordered reads were hits", hits));
    chk(ctest_done, "test not done after 16 ordered reads");
    wait_verdict();
    chk(ctest_pass, "zero-filled memory failed");
    $display("zero-filled memory: signature %h, pass %0d", signature, ctest_pass);

    // 2. one bit stuck at 1
    force dut.u_mem.mem[6][0] = 1'b1;
    clear_test();
    ordered_reads(hits);
    wait_verdict();
    chk(!ctest_pass && signature == COLS'(1), $sformatf("stuck bit: pass %0d signature %h", ctest_pass, signature));
    $display("stuck-at-1 in row 6: signature %h, pass %0d", signature, ctest_pass);
    release dut.u_mem.mem[6][0];

    // 3. concurrent test latency with uniformly random reads
    total = 0;
    for (int r = 0; r < RUNS; r++) begin
      clear_test();
      cycles = 0;
      while (!ctest_done && cycles < 5000) begin
        @(negedge clk);
        a_we = 0; a_addr = N_BITS'($urandom);
        cycles++;
      end
      chk(ctest_done, "random-read test did not finish");
      total += cycles - 1;  // the last loop pass only observed done
      @(negedge clk); a_we = 1;
    end
    mean = real'(total) / RUNS;
    expect_ctl = real'(2**N_BITS) * (1.0 + 1.0/2 + 1.0/3 + 1.0/4) * (2**K_BITS);
    $display("CTL: mean %0.1f cycles over %0d tests, expected %0.1f", mean, RUNS, expect_ctl);
    chk(mean > 0.9 * expect_ctl && mean < 1.1 * expect_ctl, "CTL outside 10 % of the expected value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
