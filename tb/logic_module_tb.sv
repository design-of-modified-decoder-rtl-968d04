// logic_module_tb: drives random word-line patterns (none, or one line) into
// the logic module and compares rve, tge, free_idx, done and test_end every
// cycle with a reference model that keeps its own list of positions seen in
// the window and its own window count. Also checks that a test made of only
// first-arrival hits ends after exactly 2^n hits, and that clr restarts.
module logic_module_tb;
  localparam int unsigned WB = 2;
  localparam int unsigned W  = 2**WB;
  localparam int unsigned NWIN = 4;  // windows in a test (2^k, k = 2)
  logic              clk = 0, rst_n = 0, clr = 0, last_window;
  logic [W-1:0]      wl = '0;
  logic              rve, tge, done, test_end;
  logic [WB-1:0]     free_idx, hits;
  int checks = 0, failures = 0;
  int win = 0;            // reference window number
  bit seen [W];           // reference cells
  bit ref_done = 0, ref_done_q = 0;
  int nrve = 0, ntge = 0;

  logic_module #(.W_BITS(WB)) dut (.*);

  always #5 clk = ~clk;
  always_comb last_window = (win == NWIN - 1);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic int first_free();
    for (int i = 0; i < W; i++) if (!seen[i]) return i;
    return 0;
  endfunction

  task automatic cycle(int sel);  // sel < 0: no word line
    bit exp_rve, exp_tge;
    int cnt = 0;
    @(negedge clk);
    if (sel == -2) sel = first_free();  // test-mode vector, taken at this cycle
    wl = (sel < 0) ? '0 : W'(1) << sel;
    #1;
    for (int i = 0; i < W; i++) cnt += seen[i];
    exp_rve = (sel >= 0) && !seen[sel] && !ref_done;
    exp_tge = exp_rve && (cnt == W - 1);
    chk(rve == exp_rve, $sformatf("rve=%0d expected %0d (sel %0d)", rve, exp_rve, sel));
    chk(tge == exp_tge, $sformatf("tge=%0d expected %0d", tge, exp_tge));
    chk(free_idx == WB'(first_free()), $sformatf("free_idx=%0d expected %0d", free_idx, first_free()));
    chk(done == ref_done && test_end == (ref_done && !ref_done_q), $sformatf("done=%0d test_end=%0d ref %0d %0d t=%0t", done, test_end, ref_done, ref_done_q, $time));
    @(posedge clk); #1;  // model state follows the DUT's clock edge
    ref_done_q = ref_done;
    if (exp_rve) begin nrve++; seen[sel] = 1; end
    if (exp_tge) begin
      ntge++;
      for (int i = 0; i < W; i++) seen[i] = 0;
      if (win == NWIN - 1) ref_done = 1;
      win = (win + 1) % NWIN;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random traffic until the test completes
    while (!ref_done) cycle($urandom_range(0, 2) == 0 ? -1 : $urandom_range(0, W - 1));
    for (int i = 0; i < 5; i++) cycle($urandom_range(0, W - 1));
    chk(nrve == W * NWIN, $sformatf("hits in a test %0d expected %0d", nrve, W * NWIN));
    chk(ntge == NWIN, $sformatf("window completions %0d expected %0d", ntge, NWIN));
    // restart, then test-mode style: always select the first free cell
    @(negedge clk); clr = 1; wl = '0;
    @(negedge clk); clr = 0;
    win = 0; ref_done = 0; ref_done_q = 0; nrve = 0;
    for (int i = 0; i < W; i++) seen[i] = 0;
    for (int c = 0; c < W * NWIN; c++) cycle(-2);
    chk(ref_done && nrve == W * NWIN, "test-mode vectors did not finish in 2^n cycles");
    cycle(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
