// memory_array_tb: writes every physical row (main and spare) with random
// data, reads them back, overwrites a random subset, checks that en = 0 blocks
// writes and returns 0, and that out-of-range rows read 0. A shadow copy in
// the testbench gives the expected data.
module memory_array_tb;
  import cbist_pkg::*;
  logic                 clk = 0, en, we;
  logic [PHYS_BITS-1:0] row;
  logic [COLS-1:0]      wdata, rdata;
  logic [COLS-1:0]      shadow [PHYS_ROWS];
  int checks = 0, failures = 0;

  memory_array dut (.*);

  always #5 clk = ~clk;

  task automatic check_row(int r, logic [COLS-1:0] exp_d);
    en = 1; we = 0; row = PHYS_BITS'(r);
    #1;
    checks++;
    if (rdata !== exp_d) begin
      failures++;
      $display("FAIL row %0d read %h expected %h", r, rdata, exp_d);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < PHYS_ROWS; r++) begin
      @(negedge clk);
      en = 1; we = 1; row = PHYS_BITS'(r); wdata = COLS'($urandom);
      shadow[r] = wdata;
    end
    @(negedge clk);
    for (int r = 0; r < PHYS_ROWS; r++) check_row(r, shadow[r]);
    for (int i = 0; i < 100; i++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, PHYS_ROWS - 1);
      en = ($urandom_range(0, 3) != 0); we = 1; row = PHYS_BITS'(r); wdata = COLS'($urandom);
      if (en) shadow[r] = wdata;
      #1;
      checks++;
      if (!en && rdata !== '0) begin
        failures++;
        $display("FAIL disabled read gave %h", rdata);
      end
    end
    @(negedge clk);
    we = 0;
    for (int r = 0; r < PHYS_ROWS; r++) check_row(r, shadow[r]);
    for (int r = PHYS_ROWS; r < 2**PHYS_BITS; r++) check_row(r, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
