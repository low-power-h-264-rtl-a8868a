// comparator_unit: running minimum of each partition's cost over a scan.
//
// For each of the 41 partitions it keeps the lowest cost seen so far and the
// motion vector of the candidate that gave it. clear (one clock) starts a
// new scan: every minimum becomes the largest cost_t value and every vector
// zero, as in the document's algorithm listing (cost_min = cost_max,
// mv = 0). While en is high, each cost strictly below its stored minimum
// replaces it together with mv, so among equal costs the first candidate
// scanned wins. The strict comparison follows the document's listing; the
// tie rule this gives and the synchronous clear are this design's own.
// Timing: one update per clock on the rising edge; outputs are registers.
module comparator_unit
  import me_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  en,
  input  cost_t cost [NPART],
  input  mv_t   mv,
  output cost_t min_cost [NPART],
  output mv_t   best_mv [NPART]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPART; i++) begin
        min_cost[i] <= '1;
        best_mv[i]  <= '0;
      end
    end else if (clear) begin
      for (int i = 0; i < NPART; i++) begin
        min_cost[i] <= '1;
        best_mv[i]  <= '0;
      end
    end else if (en) begin
      for (int i = 0; i < NPART; i++) begin
        if (cost[i] < min_cost[i]) begin
          min_cost[i] <= cost[i];
          best_mv[i]  <= mv;
        end
      end
    end
  end

endmodule
