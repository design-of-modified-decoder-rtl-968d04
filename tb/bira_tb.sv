// bira_tb: sends fault syndromes to the redundancy analysis and checks the
// repair table after each: a faulty spare is marked bad and never used, faulty
// main rows take the lowest good free spare, repair_fail rises when none is
// left, and Continue follows every ERR by one cycle.
module bira_tb;
  import cbist_pkg::*;
  logic                              clk = 0, rst_n = 0, err = 0, cont, repair_fail;
  fault_syndrome_t                   fs = '0;
  logic [SPARE_ROWS-1:0]             spare_used, spare_bad;
  logic [SPARE_ROWS-1:0][N_BITS-1:0] spare_map;
  int checks = 0, failures = 0;

  bira dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic report(bit spare, int row);
    @(negedge clk);
    err = 1; fs = '{spare: spare, row: PHYS_BITS'(row), bits: COLS'(1)};
    @(negedge clk);
    err = 0;
    chk(cont == 1, "Continue missing one cycle after ERR");
    @(negedge clk);
    chk(cont == 0, "Continue longer than one cycle");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(spare_used == '0 && spare_bad == '0 && !repair_fail && !cont, "reset state");
    // scenario 1: spare 0 faulty, main row 3 repaired with spare 1, then main 7 fails to repair
    report(1, MAIN_ROWS + 0);
    chk(spare_bad == 2'b01 && spare_used == '0, $sformatf("spare 0 marked bad: bad=%b used=%b", spare_bad, spare_used));
    report(0, 3);
    chk(spare_used == 2'b10 && spare_map[1] == 3, $sformatf("main row 3 -> spare 1: used=%b map1=%0d", spare_used, spare_map[1]));
    chk(!repair_fail, "repair_fail too early");
    report(0, 7);
    chk(repair_fail, "repair_fail not set with no spare left");
    chk(spare_used == 2'b10 && spare_map[1] == 3, "table changed by failed repair");
    // scenario 2 after reset: two main rows take spares 0 and 1 in order
    rst_n = 0; #1 rst_n = 1;
    report(0, 5);
    report(0, 9);
    chk(spare_used == 2'b11 && spare_map[0] == 5 && spare_map[1] == 9 && !repair_fail,
        $sformatf("two repairs: used=%b map=%p", spare_used, spare_map));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
