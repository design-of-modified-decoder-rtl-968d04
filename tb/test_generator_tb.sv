// test_generator_tb: the window counter holds without tge, steps by one on
// each tge, wraps after 2^k windows, flags the last window, and restarts on
// clr. A reference count kept in the testbench is compared every cycle.
module test_generator_tb;
  localparam int unsigned K = 2;
  logic         clk = 0, rst_n = 0, clr = 0, tge = 0, last;
  logic [K-1:0] tg;
  int checks = 0, failures = 0, ref_tg = 0;

  test_generator #(.K_BITS(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      checks++;
      if (tg !== K'(ref_tg) || last !== (ref_tg == 2**K - 1)) begin
        failures++;
        $display("FAIL cycle %0d tg=%0d expected %0d last=%0d", c, tg, ref_tg, last);
      end
      tge = ($urandom_range(0, 2) != 0);
      clr = ($urandom_range(0, 30) == 0);
      if (clr)      ref_tg = 0;
      else if (tge) ref_tg = (ref_tg + 1) % (2**K);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
