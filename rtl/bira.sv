// bira: built-in redundancy analysis for the row spares.
//
// The power-up BIST reports each faulty row once, with ERR and the fault
// syndrome FS. For a faulty spare row the BIRA marks that spare unusable. For
// a faulty main row it allocates the lowest-numbered spare that is neither
// faulty nor already in use and records which main row it replaces; if none is
// left, repair_fail is set. One cycle after ERR it raises Continue so the BIST
// resumes. The repair table (spare_used, spare_map) steers accesses in the
// memory wrapper. The ERR/FS/Continue exchange follows the document; the
// allocation rule and the one-cycle timing are this design's choices. The
// table is cleared by reset, so analysis is redone at every power-up.
module bira
#(
  parameter int unsigned MAIN_ROWS  = cbist_pkg::MAIN_ROWS,
  parameter int unsigned SPARE_ROWS = cbist_pkg::SPARE_ROWS,
  parameter int unsigned ADDR_BITS  = cbist_pkg::N_BITS
) (
  input  logic                                 clk,
  input  logic                                 rst_n,        // asynchronous, active low
  input  logic                                 err,          // ERR from the BIST
  input  cbist_pkg::fault_syndrome_t                      fs,           // FS from the BIST
  output logic                                 cont,         // Continue to the BIST
  output logic [SPARE_ROWS-1:0]                spare_used,   // spare allocated
  output logic [SPARE_ROWS-1:0]                spare_bad,    // spare is faulty
  output logic [SPARE_ROWS-1:0][ADDR_BITS-1:0] spare_map,    // main row replaced
  output logic                                 repair_fail   // no spare left
);

  logic                  free_found;
  logic [SPARE_ROWS-1:0] free_onehot;

  // Lowest spare that is good and unused.
  always_comb begin
    free_found  = 1'b0;
    free_onehot = '0;
    for (int s = 0; s < SPARE_ROWS; s++) begin
      if (!spare_bad[s] && !spare_used[s] && !free_found) begin
        free_onehot[s] = 1'b1;
        free_found     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cont        <= 1'b0;
      spare_used  <= '0;
      spare_bad   <= '0;
      spare_map   <= '0;
      repair_fail <= 1'b0;
    end else begin
      cont <= err;
      if (err) begin
        if (fs.spare) begin
          for (int s = 0; s < SPARE_ROWS; s++) begin
            if (32'(fs.row) == MAIN_ROWS + s) spare_bad[s] <= 1'b1;
          end
        end else if (free_found) begin
          for (int s = 0; s < SPARE_ROWS; s++) begin
            if (free_onehot[s]) begin
              spare_used[s] <= 1'b1;
              spare_map[s]  <= ADDR_BITS'(fs.row);
            end
          end
        end else begin
          repair_fail <= 1'b1;
        end
      end
    end
  end

  // Continue answers every ERR one cycle later, and only then.
  a_cont: assert property (@(posedge clk) disable iff (!rst_n) err |=> cont)
    else $error("bira: ERR not answered by Continue");
  a_no_cont: assert property (@(posedge clk) disable iff (!rst_n) !err |=> !cont)
    else $error("bira: Continue without ERR");
  // A spare is never both faulty and in use.
  a_bad_unused: assert property (@(posedge clk) disable iff (!rst_n) (spare_used & spare_bad) == '0)
    else $error("bira: faulty spare allocated");

endmodule
