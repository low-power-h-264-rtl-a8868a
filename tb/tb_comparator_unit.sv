// tb_comparator_unit: drives random cost vectors (drawn from a small range
// so that equal costs are frequent) with random enables and occasional
// clears, and checks every partition's stored minimum and motion vector
// against a model: strictly lower cost wins, the first of equal costs is
// kept, clear restores the maximum cost and a zero vector.
module tb_comparator_unit;
  import me_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  clear = 1'b0, en = 1'b0;
  cost_t cost [NPART];
  mv_t   mv = '0;
  cost_t min_cost [NPART];
  mv_t   best_mv [NPART];

  comparator_unit dut (.*);

  int checks = 0, failures = 0;
  int em [41], ex [41], ey [41];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ties;
    ties = 0;
    for (int p = 0; p < 41; p++) begin cost[p] = '0; em[p] = 65535; ex[p] = 0; ey[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 49) == 0);
      en    = !clear && ($urandom_range(0, 3) != 0);
      mv.x  = mvc_t'(int'($urandom_range(0, 15)) - 8);
      mv.y  = mvc_t'(int'($urandom_range(0, 15)) - 8);
      for (int p = 0; p < 41; p++) cost[p] = cost_t'($urandom_range(0, 60) + 10 * p);
      for (int p = 0; p < 41; p++) begin
        if (clear) begin em[p] = 65535; ex[p] = 0; ey[p] = 0; end
        else if (en) begin
          if (int'(cost[p]) == em[p]) ties++;
          if (int'(cost[p]) < em[p]) begin em[p] = int'(cost[p]); ex[p] = int'(mv.x); ey[p] = int'(mv.y); end
        end
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < 41; p++) begin
        checks += 3;
        if (int'(min_cost[p]) != em[p] || int'(best_mv[p].x) != ex[p] || int'(best_mv[p].y) != ey[p]) begin
          failures++;
          $display("FAIL step %0d partition %0d: got %0d (%0d,%0d) expected %0d (%0d,%0d)", n, p,
                   min_cost[p], best_mv[p].x, best_mv[p].y, em[p], ex[p], ey[p]);
        end
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no equal costs were exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
