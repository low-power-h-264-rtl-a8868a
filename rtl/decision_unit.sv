// decision_unit: picks the macroblock partition with the lowest total cost.
//
// After a scan the comparator unit holds, for every partition, its minimum
// cost and motion vector. When decide is pulsed this unit compares four
// ways of covering the macroblock: one 16x16 block, two 16x8, two 8x16, or
// four 8x8 quadrants, where each quadrant in turn takes the cheapest of one
// 8x8, two 8x4, two 4x8 or four 4x4 blocks. The total of the chosen blocks'
// minimum costs is the mode's cost; the mode with the lowest cost wins, ties
// going to the larger partition. The result is registered: mb_mode,
// sub_mode for quadrants A..D (meaningful for MODE_8X8), total_cost, and
// mv_4x4, the motion vector that covers each 4x4 block (index by*4 + bx).
// The document only says that this unit outputs the best partition and its
// motion vectors; comparing summed costs without a motion-vector rate term
// and the tie order are this design's own.
// Timing: valid rises one clock after decide, together with the outputs.
module decision_unit
  import me_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                decide,
  input  cost_t               min_cost [NPART],
  input  mv_t                 best_mv  [NPART],
  output logic                valid,
  output mb_mode_e            mb_mode,
  output sub_mode_e           sub_mode [4],
  output logic [COST_W+1:0]   total_cost,
  output mv_t                 mv_4x4 [16]
);

  typedef logic [COST_W+1:0] wcost_t;

  wcost_t     sub_cost [4];
  sub_mode_e  sub_sel  [4];
  wcost_t     c16, c16x8, c8x16, c8;
  mb_mode_e   mode_d;
  wcost_t     cost_d;
  mv_t        mv_d [16];

  always_comb begin
    // Best sub-partition of each 8x8 quadrant q = by8*2 + bx8.
    for (int by8 = 0; by8 < 2; by8++) begin
      for (int bx8 = 0; bx8 < 2; bx8++) begin
        wcost_t s8, s84, s48, s44;
        logic [1:0] q;
        q   = 2'(by8*2 + bx8);
        s8  = wcost_t'(min_cost[p8x8(by8, bx8)]);
        s84 = wcost_t'(min_cost[p8x4(2*by8, bx8)]) + wcost_t'(min_cost[p8x4(2*by8 + 1, bx8)]);
        s48 = wcost_t'(min_cost[p4x8(by8, 2*bx8)]) + wcost_t'(min_cost[p4x8(by8, 2*bx8 + 1)]);
        s44 = wcost_t'(min_cost[p4x4(2*by8, 2*bx8)])     + wcost_t'(min_cost[p4x4(2*by8, 2*bx8 + 1)])
            + wcost_t'(min_cost[p4x4(2*by8 + 1, 2*bx8)]) + wcost_t'(min_cost[p4x4(2*by8 + 1, 2*bx8 + 1)]);
        sub_cost[q] = s8;
        sub_sel[q]  = SUB_8X8;
        if (s84 < sub_cost[q]) begin sub_cost[q] = s84; sub_sel[q] = SUB_8X4; end
        if (s48 < sub_cost[q]) begin sub_cost[q] = s48; sub_sel[q] = SUB_4X8; end
        if (s44 < sub_cost[q]) begin sub_cost[q] = s44; sub_sel[q] = SUB_4X4; end
      end
    end

    c16   = wcost_t'(min_cost[P16X16]);
    c16x8 = wcost_t'(min_cost[p16x8(0)]) + wcost_t'(min_cost[p16x8(1)]);
    c8x16 = wcost_t'(min_cost[p8x16(0)]) + wcost_t'(min_cost[p8x16(1)]);
    c8    = sub_cost[0] + sub_cost[1] + sub_cost[2] + sub_cost[3];

    mode_d = MODE_16X16;
    cost_d = c16;
    if (c16x8 < cost_d) begin mode_d = MODE_16X8; cost_d = c16x8; end
    if (c8x16 < cost_d) begin mode_d = MODE_8X16; cost_d = c8x16; end
    if (c8    < cost_d) begin mode_d = MODE_8X8;  cost_d = c8;    end

    // Motion vector covering each 4x4 block.
    for (int by = 0; by < 4; by++) begin
      for (int bx = 0; bx < 4; bx++) begin
        logic [1:0] q;
        q = 2'((by / 2) * 2 + (bx / 2));
        unique case (mode_d)
          MODE_16X16: mv_d[by*4 + bx] = best_mv[P16X16];
          MODE_16X8:  mv_d[by*4 + bx] = best_mv[p16x8(by / 2)];
          MODE_8X16:  mv_d[by*4 + bx] = best_mv[p8x16(bx / 2)];
          default: begin
            unique case (sub_sel[q])
              SUB_8X8: mv_d[by*4 + bx] = best_mv[p8x8(by / 2, bx / 2)];
              SUB_8X4: mv_d[by*4 + bx] = best_mv[p8x4(by, bx / 2)];
              SUB_4X8: mv_d[by*4 + bx] = best_mv[p4x8(by / 2, bx)];
              default: mv_d[by*4 + bx] = best_mv[p4x4(by, bx)];
            endcase
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid      <= 1'b0;
      mb_mode    <= MODE_16X16;
      total_cost <= '0;
      for (int i = 0; i < 4; i++)  sub_mode[i] <= SUB_8X8;
      for (int i = 0; i < 16; i++) mv_4x4[i]   <= '0;
    end else begin
      valid <= decide;
      if (decide) begin
        mb_mode    <= mode_d;
        total_cost <= cost_d;
        for (int i = 0; i < 4; i++)  sub_mode[i] <= sub_sel[i];
        for (int i = 0; i < 16; i++) mv_4x4[i]   <= mv_d[i];
      end
    end
  end

endmodule
