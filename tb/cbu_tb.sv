// cbu_tb: the concurrent BIST unit monitors random n-bit vectors. A reference
// model in the testbench keeps the current window and the set of vectors
// already captured, and predicts rve and tge for each vector; valid = 0 cycles
// must never hit. A full normal-mode test must capture every one of the 2^n
// vectors exactly once. Then, after clr, the unit's own test vector is fed
// back (test mode): the test must end after exactly 2^n cycles, with every
// vector captured once, and test_end must pulse once.
module cbu_tb;
  localparam int unsigned WB = 2, KB = 2, N = WB + KB;
  logic         clk = 0, rst_n = 0, clr = 0, vec_valid = 0;
  logic [N-1:0] d = '0, tg_vec;
  logic         rve, tge, done, test_end;
  int checks = 0, failures = 0;
  int win = 0;
  int hitcount [2**N];
  bit ref_done = 0;
  int n_end = 0;

  cbu #(.W_BITS(WB), .K_BITS(KB)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic int seen_in_window();
    int c = 0;
    for (int p = 0; p < 2**WB; p++) if (hitcount[win * 2**WB + p] > 0) c++;
    return c;
  endfunction

  // use_tg: apply the unit's own test vector as it is in this cycle
  task automatic apply(logic [N-1:0] v, bit valid, bit use_tg = 0);
    bit exp_rve, exp_tge;
    @(negedge clk);
    if (use_tg) v = tg_vec;
    d = v; vec_valid = valid;
    #1;
    exp_rve = valid && !ref_done && (int'(v) / 2**WB == win) && hitcount[v] == 0;
    exp_tge = exp_rve && seen_in_window() == 2**WB - 1;
    chk(rve == exp_rve, $sformatf("vector %0d valid %0d: rve=%0d expected %0d", v, valid, rve, exp_rve));
    chk(tge == exp_tge, $sformatf("vector %0d: tge=%0d expected %0d", v, tge, exp_tge));
    if (test_end) n_end++;
    @(posedge clk);  // model state follows the DUT's clock edge
    if (exp_rve) hitcount[v]++;
    if (exp_tge) begin
      if (win == 2**KB - 1) ref_done = 1;
      win = (win + 1) % 2**KB;
    end
  endtask

  task automatic restart();
    @(negedge clk); clr = 1; vec_valid = 0;
    @(negedge clk); clr = 0;
    win = 0; ref_done = 0; n_end = 0;
    for (int i = 0; i < 2**N; i++) hitcount[i] = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    restart();
    while (!ref_done) apply(N'($urandom), $urandom_range(0, 4) != 0);
    apply('0, 1); apply('0, 1);
    chk(done == 1, "done not set after normal-mode test");
    chk(n_end == 1, $sformatf("test_end pulsed %0d times", n_end));
    for (int i = 0; i < 2**N; i++) chk(hitcount[i] == 1, $sformatf("vector %0d captured %0d times", i, hitcount[i]));
    // test mode: feed TG back as the vector
    restart();
    cycles = 0;
    while (!ref_done && cycles < 1000) begin
      apply('0, 1, 1);
      cycles++;
    end
    chk(cycles == 2**N, $sformatf("test mode took %0d cycles, expected %0d", cycles, 2**N));
    for (int i = 0; i < 2**N; i++) chk(hitcount[i] == 1, $sformatf("test mode vector %0d captured %0d times", i, hitcount[i]));
    apply('0, 1, 1);
    chk(n_end == 1, "test_end in test mode");
    // mixed: half the window via normal vectors, then test mode completes it
    restart();
    apply(N'(2), 1); apply(N'(0), 1); apply(N'(2), 1);
    cycles = 0;
    while (!ref_done && cycles < 1000) begin apply('0, 1, 1); cycles++; end
    chk(cycles == 2**N - 2, $sformatf("mixed test took %0d test-mode cycles", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
