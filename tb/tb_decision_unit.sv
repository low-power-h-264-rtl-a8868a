// tb_decision_unit: feeds random minimum costs and motion vectors, biased
// so that each macroblock mode and each 8x8 sub-mode wins in some vectors,
// and checks mode, sub-modes, total cost and the sixteen 4x4 motion vectors
// against the reference decision in me_ref_pkg, plus the one-clock latency
// of valid. A second set of vectors prices every partition per pixel so
// that modes and sub-modes tie exactly; the larger partition must win
// (16x16, then 16x8 over 8x16, then 8x4 over 4x8).
module tb_decision_unit;
  import me_pkg::*;
  import me_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       decide = 1'b0;
  cost_t      min_cost [NPART];
  mv_t        best_mv [NPART];
  logic       valid;
  mb_mode_e   mb_mode;
  sub_mode_e  sub_mode [4];
  logic [COST_W+1:0] total_cost;
  mv_t        mv_4x4 [16];

  decision_unit dut (.*);

  int checks = 0, failures = 0;
  int seen_mode [4];
  int seen_sub [4];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    cost41_t mn;
    int mvx [41], mvy [41];
    int mode, total, sub [4], vx [16], vy [16];
    for (int k = 0; k < 4; k++) begin seen_mode[k] = 0; seen_sub[k] = 0; end
    for (int p = 0; p < 41; p++) begin min_cost[p] = '0; best_mv[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int favour;
      favour = n % 8;
      for (int p = 0; p < 41; p++) begin
        int x, y, w, h, base;
        part_geom(p, x, y, w, h);
        base = w * h * 8;
        // make one partition size relatively cheap
        if ((favour == 0 && p == 40) || (favour == 1 && p >= 36 && p < 38) ||
            (favour == 2 && p >= 38 && p < 40) || (favour == 3 && p >= 32 && p < 36) ||
            (favour == 4 && p >= 16 && p < 24) || (favour == 5 && p >= 24 && p < 32) ||
            (favour == 6 && p < 16))
          base = w * h * 2;
        mn[p]  = base + int'($urandom_range(0, w * h * 4));
        mvx[p] = int'($urandom_range(0, 15)) - 8;
        mvy[p] = int'($urandom_range(0, 15)) - 8;
        min_cost[p]  = cost_t'(mn[p]);
        best_mv[p].x = mvc_t'(mvx[p]);
        best_mv[p].y = mvc_t'(mvy[p]);
      end
      me_ref_pkg::decide(mn, mvx, mvy, mode, sub, total, vx, vy);
      @(negedge clk) decide = 1'b1;
      @(negedge clk) decide = 1'b0;
      check("valid after one clock", int'(valid), 1);
      check("mode", int'(mb_mode), mode);
      check("total", int'(total_cost), total);
      seen_mode[mode]++;
      if (mode == 3) for (int q = 0; q < 4; q++) begin
        check("sub", int'(sub_mode[q]), sub[q]);
        seen_sub[sub[q]]++;
      end
      for (int b = 0; b < 16; b++) begin
        check("mvx", int'(mv_4x4[b].x), vx[b]);
        check("mvy", int'(mv_4x4[b].y), vy[b]);
      end
      @(negedge clk);
      check("valid is a pulse", int'(valid), 0);
    end
    // ties: every partition priced per pixel, with some sizes dearer, so
    // that equal totals must be resolved in favour of the larger partition
    for (int n = 0; n < 60; n++) begin
      int kind;
      kind = n % 3;
      for (int p = 0; p < 41; p++) begin
        int x, y, w, h, rate;
        part_geom(p, x, y, w, h);
        rate = 4;
        // kind 1: 16x16 and 8x8-family dearer, so 16x8 ties with 8x16
        if (kind == 1 && (p == 40 || p < 36)) rate = 6;
        // kind 2: only 8x4 and 4x8 cheap, so they tie inside each quadrant
        if (kind == 2 && !(p >= 16 && p < 32)) rate = 6;
        mn[p]  = rate * w * h;
        mvx[p] = int'($urandom_range(0, 15)) - 8;
        mvy[p] = int'($urandom_range(0, 15)) - 8;
        min_cost[p]  = cost_t'(mn[p]);
        best_mv[p].x = mvc_t'(mvx[p]);
        best_mv[p].y = mvc_t'(mvy[p]);
      end
      me_ref_pkg::decide(mn, mvx, mvy, mode, sub, total, vx, vy);
      check($sformatf("tie kind %0d reference mode", kind), mode, (kind == 0) ? 0 : (kind == 1) ? 1 : 3);
      @(negedge clk) decide = 1'b1;
      @(negedge clk) decide = 1'b0;
      check("tie mode", int'(mb_mode), mode);
      check("tie total", int'(total_cost), total);
      if (mode == 3) for (int q = 0; q < 4; q++) begin
        check("tie sub is 8x4", int'(sub[q]), 1);
        check("tie sub", int'(sub_mode[q]), sub[q]);
      end
      for (int b = 0; b < 16; b++) begin
        check("tie mvx", int'(mv_4x4[b].x), vx[b]);
        check("tie mvy", int'(mv_4x4[b].y), vy[b]);
      end
    end
    for (int k = 0; k < 4; k++) begin
      check($sformatf("mode %0d seen", k), int'(seen_mode[k] > 0), 1);
      check($sformatf("sub-mode %0d seen", k), int'(seen_sub[k] > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
