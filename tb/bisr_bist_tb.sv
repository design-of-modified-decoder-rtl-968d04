// bisr_bist_tb: the power-up BIST runs against a memory model in the
// testbench that can hold stuck-at bits, and the testbench answers ERR with
// Continue one cycle later, as the redundancy analysis does.
// Run 1, fault free: the rows are visited spares first, then main rows, each
// with six accesses; done after exactly 6 * 12 cycles, no ERR, all rows 0.
// Run 2: a stuck-at-1 bit in spare row 11 and a stuck-at-0 bit in main row 4
// must be reported once each, in that order, with the right syndrome.
module bisr_bist_tb;
  import cbist_pkg::*;
  logic                 clk = 0, rst_n = 0, cont = 0;
  logic [COLS-1:0]      rdata;
  logic                 active, we, err, done;
  logic [PHYS_BITS-1:0] row;
  logic [COLS-1:0]      wdata;
  fault_syndrome_t      fs;
  logic [COLS-1:0]      mem [PHYS_ROWS];
  logic [COLS-1:0]      stuck1 [PHYS_ROWS];
  logic [COLS-1:0]      stuck0 [PHYS_ROWS];
  int checks = 0, failures = 0;
  int order [$];
  fault_syndrome_t reports [$];

  bisr_bist dut (.*);

  always #5 clk = ~clk;

  // memory model: asynchronous read with stuck-at bits, synchronous write
  always_comb rdata = (row < PHYS_ROWS) ? ((mem[row] | stuck1[row]) & ~stuck0[row]) : '0;
  always_ff @(posedge clk) if (active && we && row < PHYS_ROWS) mem[row] <= wdata;
  always_ff @(posedge clk) cont <= err;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic run(output int cycles);
    order.delete(); reports.delete();
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    cycles = 0;
    while (!done && cycles < 500) begin
      if (order.size() == 0 || order[$] != int'(row)) order.push_back(int'(row));
      if (err) reports.push_back(fs);
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    for (int r = 0; r < PHYS_ROWS; r++) begin
      mem[r] = COLS'($urandom); stuck1[r] = '0; stuck0[r] = '0;
    end
    run(cycles);
    chk(cycles == 6 * PHYS_ROWS, $sformatf("fault-free run took %0d cycles, expected %0d", cycles, 6 * PHYS_ROWS));
    chk(reports.size() == 0, "ERR in a fault-free run");
    chk(order.size() == PHYS_ROWS, $sformatf("%0d rows visited", order.size()));
    for (int i = 0; i < PHYS_ROWS && i < order.size(); i++)
      chk(order[i] == (i < SPARE_ROWS ? MAIN_ROWS + i : i - SPARE_ROWS), $sformatf("row order %0d: %0d", i, order[i]));
    for (int r = 0; r < PHYS_ROWS; r++) chk(mem[r] == '0, $sformatf("row %0d left at %h", r, mem[r]));
    chk(!active && done, "BIST did not release the memory");
    // faulty run
    stuck1[11] = COLS'(1 << 2);
    stuck0[4]  = COLS'(1 << 9);
    run(cycles);
    chk(done, "faulty run did not finish");
    chk(reports.size() == 2, $sformatf("%0d reports, expected 2", reports.size()));
    if (reports.size() == 2) begin
      chk(reports[0].spare && reports[0].row == 11 && reports[0].bits == COLS'(1 << 2),
          $sformatf("first report %p", reports[0]));
      chk(!reports[1].spare && reports[1].row == 4 && reports[1].bits == COLS'(1 << 9),
          $sformatf("second report %p", reports[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
