// tb_me_mc_m8p_cif: the end-to-end test of tb_me_mc_m8p run at the search
// range used for CIF video, P1 = 16 (candidates [-16, 15], second pass
// [c-8, c+7], 48x48 search-area memory). The macroblock scenarios, the
// reference model, the compared outputs and the mechanism counts are the
// same as at the default size. The document gives no cycle budget at this
// range; the bound checked here (1700 clocks per macroblock, either mode)
// is this design's own and only guards against a slowdown of the scan.
module tb_me_mc_m8p_cif;
  import me_pkg::*;
  import me_ref_pkg::*;

  localparam int P1  = 16;
  localparam int P2  = P1 / 2;
  localparam int SA_N = 2 * P1 + 16;
  localparam int XW   = $clog2(SA_N);
  localparam int GW   = $clog2(SA_N / 4);
  localparam int NMB = 8;
  localparam int MAX_TWO_STEP = 1700;
  localparam int MAX_FULL     = 1700;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cur_we = 1'b0;
  logic [7:0]  cur_waddr = '0;
  pix_t        cur_wdata = '0;
  logic        sa_wr_valid = 1'b0, sa_wr_ready;
  logic [XW-1:0] sa_wr_x = '0;
  logic [GW-1:0] sa_wr_g = '0;
  pix_t        sa_wr_pix [4];
  logic        start = 1'b0, two_step = 1'b0, busy, done;
  mb_mode_e    mb_mode;
  sub_mode_e   sub_mode [4];
  logic [COST_W+1:0] total_cost;
  mv_t         mv_4x4 [16];
  mv_t         centre;
  logic [31:0] bank_reads;
  logic [15:0] cycles;

  me_mc_m8p #(.P1(P1)) dut (.*);

  int checks = 0, failures = 0;
  int sa [SA_MAX][SA_MAX];
  int cur [16][16];

  // mechanism counters
  int n_conv = 0, n_two = 0, n_clamp = 0, n_mode16 = 0, n_mode8 = 0;
  int n_dem_lo = 0, n_dem_hi = 0, n_pf_row = 0, n_pf_col = 0;
  int n_stall = 0;
  int max_cyc_two = 0, max_cyc_full = 0;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe the memory's fetches and the scan's stalls
  always @(posedge clk) begin
    if (dut.u_sa.start_dem) begin
      if (dut.u_sa.rd_full) n_dem_hi++; else n_dem_lo++;
    end
    if (dut.u_sa.start_pf) begin
      if (dut.u_sa.nf.col) n_pf_col++; else n_pf_row++;
    end
    if (dut.state == 3'd2 && dut.rd_req && !dut.rd_valid) n_stall++;
  end

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic build(input int kind);
    int dx [4], dy [4];
    for (int y = 0; y < SA_N; y++)
      for (int x = 0; x < SA_N; x++)
        sa[y][x] = (kind == 3) ? 100 : int'($urandom_range(0, 255));
    for (int q = 0; q < 4; q++) begin
      case (kind)
        0: begin dx[q] = (q == 0) ? int'($urandom_range(0, 2*P1 - 1)) - P1 : dx[0];
                 dy[q] = (q == 0) ? int'($urandom_range(0, 2*P1 - 1)) - P1 : dy[0]; end
        1: begin dx[q] = int'($urandom_range(0, 2*P1 - 1)) - P1; dy[q] = int'($urandom_range(0, 2*P1 - 1)) - P1; end
        2: begin dx[q] = P1 - 1 - (q % 2); dy[q] = P1 - 1 - (q / 2); end
        default: begin dx[q] = 0; dy[q] = 0; end
      endcase
    end
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int q;
        q = (y / 8) * 2 + (x / 8);
        cur[y][x] = clip(sa[y + dy[q] + P1][x + dx[q] + P1] + int'($urandom_range(0, 4)) - 2);
      end
  endtask

  task automatic load_dut();
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        @(negedge clk);
        cur_we = 1'b1; cur_waddr = 8'(y*16 + x); cur_wdata = pix_t'(cur[y][x]);
      end
    @(negedge clk) cur_we = 1'b0;
    for (int g = 0; g < SA_N / 4; g++)
      for (int x = 0; x < SA_N; x++) begin
        @(negedge clk);
        while (!sa_wr_ready) @(negedge clk);
        sa_wr_valid = 1'b1; sa_wr_x = XW'(x); sa_wr_g = GW'(g);
        for (int i = 0; i < 4; i++) sa_wr_pix[i] = pix_t'(sa[4*g + i][x]);
        @(negedge clk) sa_wr_valid = 1'b0;
      end
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input bit ts, input int mb);
    cost41_t mn;
    int mvx [41], mvy [41];
    int mode, total, sub [4], vx [16], vy [16];
    int cx, cy;
    // reference
    cx = 0; cy = 0;
    if (ts) begin
      int ux, uy;
      search(cur, sa, P1, 0, 0, P1, 1'b1, mn, mvx, mvy);
      cx = centre_of(mvx[32], mvx[33], mvx[34], mvx[35], P1 - P2);
      cy = centre_of(mvy[32], mvy[33], mvy[34], mvy[35], P1 - P2);
      ux = centre_of(mvx[32], mvx[33], mvx[34], mvx[35], 99);
      uy = centre_of(mvy[32], mvy[33], mvy[34], mvy[35], 99);
      if (ux != cx || uy != cy) n_clamp++;
      search(cur, sa, P1, cx, cy, P2, 1'b0, mn, mvx, mvy);
    end else begin
      search(cur, sa, P1, 0, 0, P1, 1'b0, mn, mvx, mvy);
    end
    decide(mn, mvx, mvy, mode, sub, total, vx, vy);
    // DUT
    @(negedge clk);
    start = 1'b1; two_step = ts;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(posedge clk);
    #1;
    check($sformatf("mb%0d ts%0d mode", mb, ts), int'(mb_mode), mode);
    check($sformatf("mb%0d ts%0d cost", mb, ts), int'(total_cost), total);
    if (mode == 3)
      for (int q = 0; q < 4; q++) check($sformatf("mb%0d ts%0d sub%0d", mb, ts, q), int'(sub_mode[q]), sub[q]);
    for (int b = 0; b < 16; b++) begin
      check($sformatf("mb%0d ts%0d mvx%0d", mb, ts, b), int'(mv_4x4[b].x), vx[b]);
      check($sformatf("mb%0d ts%0d mvy%0d", mb, ts, b), int'(mv_4x4[b].y), vy[b]);
    end
    if (ts) begin
      check($sformatf("mb%0d centre x", mb), int'(centre.x), cx);
      check($sformatf("mb%0d centre y", mb), int'(centre.y), cy);
      n_two++;
      if (int'(cycles) > max_cyc_two) max_cyc_two = int'(cycles);
      check($sformatf("mb%0d two-step cycles %0d < %0d", mb, cycles, MAX_TWO_STEP), int'(cycles < 16'(MAX_TWO_STEP)), 1);
    end else begin
      n_conv++;
      if (int'(cycles) > max_cyc_full) max_cyc_full = int'(cycles);
      check($sformatf("mb%0d full cycles %0d < %0d", mb, cycles, MAX_FULL), int'(cycles < 16'(MAX_FULL)), 1);
    end
    if (mode == 0) n_mode16++;
    if (mode == 3) n_mode8++;
  endtask

  initial begin
    for (int i = 0; i < 4; i++) sa_wr_pix[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int mb = 0; mb < NMB; mb++) begin
      build(mb % 4);
      load_dut();
      run(1'b0, mb);
      run(1'b1, mb);
    end
    $display("mechanisms: conv=%0d two_step=%0d clamp=%0d mode16x16=%0d mode8x8=%0d",
             n_conv, n_two, n_clamp, n_mode16, n_mode8);
    $display("fetches: demand_lo=%0d demand_hi=%0d prefetch_row=%0d prefetch_col=%0d stall_cycles=%0d",
             n_dem_lo, n_dem_hi, n_pf_row, n_pf_col, n_stall);
    $display("cycles per MB: two-step max %0d, full search max %0d", max_cyc_two, max_cyc_full);
    check("conventional search ran", int'(n_conv > 0), 1);
    check("two-step search ran", int'(n_two > 0), 1);
    check("centre clamp happened", int'(n_clamp > 0), 1);
    check("16x16 decision happened", int'(n_mode16 > 0), 1);
    check("8x8 decision happened", int'(n_mode8 > 0), 1);
    check("low-res demand fetch happened", int'(n_dem_lo > 0), 1);
    check("full-res demand fetch happened", int'(n_dem_hi > 0), 1);
    check("row prefetch happened", int'(n_pf_row > 0), 1);
    check("column prefetch happened", int'(n_pf_col > 0), 1);
    check("scan stall happened", int'(n_stall > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
