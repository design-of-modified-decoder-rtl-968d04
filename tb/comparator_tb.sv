// comparator_tb: exhaustive check of the k-stage window comparator.
// Every combination of enable, vector bits and test generator state is
// applied; match must equal (en && vec_hi == tg).
module comparator_tb;
  localparam int unsigned K = 2;
  logic         en, match;
  logic [K-1:0] vec_hi, tg;
  int checks = 0, failures = 0;

  comparator #(.K_BITS(K)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 2**K; v++)
        for (int t = 0; t < 2**K; t++) begin
          en = e[0]; vec_hi = K'(v); tg = K'(t);
          #1;
          checks++;
          if (match !== (e == 1 && v == t)) begin
            failures++;
            $display("FAIL en=%0d vec=%0d tg=%0d match=%0d", e, v, t, match);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
