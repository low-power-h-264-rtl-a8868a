// tb_me_combine: checks the shared computation unit on real pixel data.
// A random current macroblock and search area are built; the macroblock is
// shifted into both arrays, then for each resolution (DPC first, then SAD)
// the first candidate block is loaded row by row and a 4x4 set of
// candidates around a chosen centre is scanned in serpentine order with the
// three shift directions. The minimum costs, their vectors and the final
// partition decision are compared with the reference model. The SAD pass
// starts from a stale SAD array only if load gating failed to keep it idle
// during the DPC pass, which the test also checks directly.
module tb_me_combine;
  import me_pkg::*;
  import me_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        low_res = 1'b0, load_c = 1'b0, load_r = 1'b0;
  pix_t        c_row_in [MB];
  rsel_e       sel = R_FROM_BOTTOM;
  pix_t        r_row_in [MB];
  pix_t        r_col_in [MB];
  logic        cmp_clear = 1'b0, cmp_en = 1'b0, decide = 1'b0;
  mv_t         cand_mv = '0;
  cost_t       min_cost [NPART];
  mv_t         best_mv [NPART];
  logic        dec_valid;
  mb_mode_e    mb_mode;
  sub_mode_e   sub_mode [4];
  logic [COST_W+1:0] total_cost;
  mv_t         mv_4x4 [16];

  me_combine dut (.*);

  int checks = 0, failures = 0;
  int sa [SA_MAX][SA_MAX];
  int cur [16][16];
  localparam int P1 = 8;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic pass(input bit low, input int cx, input int cy);
    int r, x0, y0, ax, ay;
    cost41_t mn;
    int mvx [41], mvy [41];
    int mode, total, sub [4], vx [16], vy [16];
    r  = 2;
    x0 = cx - r + P1; y0 = cy - r + P1;
    @(negedge clk);
    low_res = low; cmp_clear = 1'b1;
    @(negedge clk);
    cmp_clear = 1'b0;
    for (int n = 0; n < 16; n++) begin
      load_r = 1'b1; sel = R_FROM_BOTTOM;
      for (int k = 0; k < 16; k++) r_row_in[k] = pix_t'(sa[y0 + n][x0 + k]);
      @(negedge clk);
    end
    load_r = 1'b0;
    ax = x0; ay = y0;
    for (int i = 0; i < 2*r; i++)
      for (int k = 0; k < 2*r; k++) begin
        bit last_in_col;
        cmp_en = 1'b1;
        cand_mv.x = mvc_t'(ax - P1);
        cand_mv.y = mvc_t'(ay - P1);
        last_in_col = (k == 2*r - 1);
        load_r = 1'b0;
        if (!last_in_col) begin
          load_r = 1'b1;
          if (i % 2 == 0) begin
            sel = R_FROM_BOTTOM;
            for (int c = 0; c < 16; c++) r_row_in[c] = pix_t'(sa[ay + 16][ax + c]);
            ay++;
          end else begin
            sel = R_FROM_TOP;
            for (int c = 0; c < 16; c++) r_row_in[c] = pix_t'(sa[ay - 1][ax + c]);
            ay--;
          end
        end else if (i != 2*r - 1) begin
          load_r = 1'b1;
          sel = R_FROM_RIGHT;
          for (int q = 0; q < 16; q++) r_col_in[q] = pix_t'(sa[ay + q][ax + 16]);
          ax++;
        end
        @(negedge clk);
      end
    cmp_en = 1'b0; load_r = 1'b0;
    search(cur, sa, P1, cx, cy, r, low, mn, mvx, mvy);
    for (int p = 0; p < 41; p++) begin
      check($sformatf("low%0d min p%0d", low, p), int'(min_cost[p]), mn[p]);
      check($sformatf("low%0d mvx p%0d", low, p), int'(best_mv[p].x), mvx[p]);
      check($sformatf("low%0d mvy p%0d", low, p), int'(best_mv[p].y), mvy[p]);
    end
    me_ref_pkg::decide(mn, mvx, mvy, mode, sub, total, vx, vy);
    decide = 1'b1;
    @(negedge clk);
    decide = 1'b0;
    check("dec_valid", int'(dec_valid), 1);
    check($sformatf("low%0d mode", low), int'(mb_mode), mode);
    check($sformatf("low%0d total", low), int'(total_cost), total);
    for (int b = 0; b < 16; b++) begin
      check("mv4x4 x", int'(mv_4x4[b].x), vx[b]);
      check("mv4x4 y", int'(mv_4x4[b].y), vy[b]);
    end
  endtask

  initial begin
    int snap;
    for (int k = 0; k < 16; k++) begin c_row_in[k] = '0; r_row_in[k] = '0; r_col_in[k] = '0; end
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) sa[y][x] = int'($urandom_range(0, 255));
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        cur[y][x] = (sa[y + P1 + 1][x + P1 - 1] + int'($urandom_range(0, 6))) % 256;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // current macroblock: bottom row first
    for (int n = 15; n >= 0; n--) begin
      load_c = 1'b1;
      for (int k = 0; k < 16; k++) c_row_in[k] = pix_t'(cur[n][k]);
      @(negedge clk);
    end
    load_c = 1'b0;
    pass(1'b1, 0, 0);
    // full-resolution pass after a low-resolution one
    pass(1'b0, -1, 1);
    // the SAD array must not have moved during a low-resolution pass: it
    // still holds the last candidate of the SAD pass, top-left (8, 7)
    pass(1'b1, 3, -2);
    snap = int'(dut.u_sad_array.g_row[5].g_col[5].g_sad.u_pe.r_q);
    check("SAD array idle during low-res pass", snap, sa[7 + 5][8 + 5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
