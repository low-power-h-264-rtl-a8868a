// tb_adder_tree: checks all 41 partition costs against a direct summation
// over each partition's pixels, for random 8-bit inputs (SAD), random 1-bit
// inputs (DPC) and the all-255 extreme that fills the 16-bit 16x16 cost.
module tb_adder_tree;
  import me_pkg::*;
  import me_ref_pkg::*;

  pix_t  diff [NPE];
  cost_t cost [NPART];

  adder_tree dut (.diff, .cost);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d [16][16];
    cost41_t e;
    for (int n = 0; n < 60; n++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          d[y][x] = (n == 0) ? 255 : (n % 2 == 1) ? int'($urandom_range(0, 1)) : int'($urandom_range(0, 255));
          diff[y*16 + x] = pix_t'(d[y][x]);
        end
      costs_from_diff(d, e);
      #1;
      for (int p = 0; p < 41; p++) begin
        checks++;
        if (int'(cost[p]) != e[p]) begin
          failures++;
          $display("FAIL vector %0d partition %0d: got %0d expected %0d", n, p, cost[p], e[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
