// tn_mux_tb: checks the T/N multiplexer for every mode, write request and a
// set of vector pairs: d follows A in normal mode and TG in test mode, and a
// write reaches the memory only in normal mode.
module tn_mux_tb;
  localparam int unsigned N = 4;
  logic         tn, a_we, d_we;
  logic [N-1:0] a, tg, d;
  int checks = 0, failures = 0;

  tn_mux #(.N_BITS(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int w = 0; w < 2; w++)
        for (int i = 0; i < 2**N; i++) begin
          tn = m[0]; a_we = w[0]; a = N'(i); tg = N'(2**N - 1 - i);
          #1;
          checks++;
          if (d !== (m == 1 ? N'(2**N - 1 - i) : N'(i)) || d_we !== (m == 0 && w == 1)) begin
            failures++;
            $display("FAIL tn=%0d we=%0d a=%0d tg=%0d d=%0d d_we=%0d", m, w, a, tg, d, d_we);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
