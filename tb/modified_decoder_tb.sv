// modified_decoder_tb: exhaustive check of the enabled w-to-2^w decoder.
// For every address and enable the word lines must be one-hot at the address
// when enabled and all zero otherwise.
module modified_decoder_tb;
  localparam int unsigned WB = 2;
  logic              en;
  logic [WB-1:0]     addr;
  logic [2**WB-1:0]  wl;
  int checks = 0, failures = 0;

  modified_decoder #(.W_BITS(WB)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 2**WB; a++) begin
        logic [2**WB-1:0] exp_wl;
        en = e[0]; addr = WB'(a);
        exp_wl = (e == 1) ? (2**WB)'(1) << a : '0;
        #1;
        checks++;
        if (wl !== exp_wl) begin
          failures++;
          $display("FAIL en=%0d addr=%0d wl=%b expected %b", e, a, wl, exp_wl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
