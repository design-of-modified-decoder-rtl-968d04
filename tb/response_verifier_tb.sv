// response_verifier_tb: random responses are captured on random rve cycles;
// the signature must equal the modulo-2^m sum kept by the testbench. At
// test_end the verdict must be pass for the correct golden signature and fail
// for a wrong one; clr must clear everything. The same responses presented in
// reverse order must give the same signature (order independence).
module response_verifier_tb;
  localparam int unsigned M = 10;
  logic         clk = 0, rst_n = 0, clr = 0, rve = 0, test_end = 0;
  logic [M-1:0] resp = '0, golden = '0, sig;
  logic         result_valid, pass;
  logic [M-1:0] vals [16];
  int checks = 0, failures = 0;

  response_verifier #(.M_BITS(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Capture vals in the given order, with idle cycles between, return signature.
  task automatic run(bit reverse, output logic [M-1:0] s);
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      rve  = 1; resp = vals[reverse ? 15 - i : i];
      @(negedge clk);
      rve  = 0; resp = COLS_RAND();
    end
    #1 s = sig;
  endtask

  function automatic logic [M-1:0] COLS_RAND();
    return M'($urandom);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] s1, s2, ref_sum;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      ref_sum = '0;
      for (int i = 0; i < 16; i++) begin
        vals[i] = (trial == 0) ? '0 : M'($urandom);
        ref_sum = ref_sum + vals[i];
      end
      run(0, s1);
      chk(s1 == ref_sum, $sformatf("signature %h expected %h", s1, ref_sum));
      chk(result_valid == 0, "verdict before test_end");
      // evaluate against a right or a wrong golden value
      @(negedge clk);
      golden = (trial % 2 == 0) ? ref_sum : ref_sum ^ M'(1 << trial);
      test_end = 1;
      @(negedge clk);
      test_end = 0;
      chk(result_valid == 1, "no verdict after test_end");
      chk(pass == (trial % 2 == 0), $sformatf("trial %0d pass=%0d", trial, pass));
      run(1, s2);
      chk(s2 == s1, $sformatf("reverse order signature %h vs %h", s2, s1));
    end
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    chk(sig == '0 && result_valid == 0 && pass == 0, "clr did not clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
