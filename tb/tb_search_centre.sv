// tb_search_centre: checks the second search centre for every corner case
// of the rounding (odd sums, negative sums) and the clamp, using random
// 8x8 motion vectors in [-8, 7] and a few hand-picked sets, against
// floor((min + max) / 2) clamped to [-(P1-P2), P1-P2].
module tb_search_centre;
  import me_pkg::*;
  import me_ref_pkg::*;

  mv_t mv_8x8 [4];
  mv_t centre;

  search_centre #(.P1(8), .P2(4)) dut (.mv_8x8, .centre);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vx [4], vy [4];
    int clamped;
    clamped = 0;
    for (int n = 0; n < 1000; n++) begin
      int ex, ey;
      for (int q = 0; q < 4; q++) begin
        case (n)
          0: begin vx[q] = 7;  vy[q] = -8; end               // clamp both ways
          1: begin vx[q] = (q == 0) ? -3 : 0; vy[q] = (q == 1) ? 3 : 0; end  // -1.5 -> -2, 1.5 -> 1
          2: begin vx[q] = -8 + 5*q; vy[q] = 7 - 5*q; end
          default: begin vx[q] = int'($urandom_range(0, 15)) - 8; vy[q] = int'($urandom_range(0, 15)) - 8; end
        endcase
        mv_8x8[q].x = mvc_t'(vx[q]);
        mv_8x8[q].y = mvc_t'(vy[q]);
      end
      ex = centre_of(vx[0], vx[1], vx[2], vx[3], 4);
      ey = centre_of(vy[0], vy[1], vy[2], vy[3], 4);
      if (ex != centre_of(vx[0], vx[1], vx[2], vx[3], 99)) clamped++;
      #1;
      checks += 2;
      if (int'(centre.x) != ex || int'(centre.y) != ey) begin
        failures++;
        $display("FAIL set %0d: got (%0d,%0d) expected (%0d,%0d)", n, centre.x, centre.y, ex, ey);
      end
    end
    checks++;
    if (clamped == 0) begin failures++; $display("FAIL clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
