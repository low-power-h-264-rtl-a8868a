// pe_array: 16x16 processing-element array that evaluates one candidate per
// clock.
//
// PE (r, c) sits at row r, column c of the macroblock. The current
// macroblock enters at the top, one row per clock while load_c is high, and
// shifts down; after 16 loads the row fed first sits in the bottom row. The
// search window is held in the search-pixel registers and moves by one pixel
// per load_r:
//   sel = R_FROM_BOTTOM  rows move up, r_row_in enters the bottom row
//                        (candidate moves down);
//   sel = R_FROM_TOP     rows move down, r_row_in enters the top row
//                        (candidate moves up);
//   sel = R_FROM_RIGHT   columns move left, r_col_in enters the right column
//                        (candidate moves right).
// LOW_RES = 0 builds the array from sad_pe (8-bit absolute differences);
// LOW_RES = 1 builds it from dpc_pe, which keeps only bits [7:6] of every
// input pixel and gives a 1-bit mismatch, returned in bit 0 of diff. The
// neighbour connections follow the document's PE drawing (top, bottom and
// right inputs); that it is a 16x16 array of 256 PEs is the document's.
// Timing: diff is combinational from the registers loaded at the last edge.
module pe_array
  import me_pkg::*;
#(
  parameter bit LOW_RES = 1'b0
) (
  input  logic  clk,
  input  logic  load_c,
  input  pix_t  c_row_in [MB],
  input  logic  load_r,
  input  rsel_e sel,
  input  pix_t  r_row_in [MB],
  input  pix_t  r_col_in [MB],
  output pix_t  diff [NPE]
);

  localparam int W = LOW_RES ? LR_W : PIX_W;

  logic [W-1:0] c_q [MB][MB];
  logic [W-1:0] r_q [MB][MB];

  for (genvar r = 0; r < MB; r++) begin : g_row
    for (genvar c = 0; c < MB; c++) begin : g_col
      logic [W-1:0] c_src, r_top, r_bot, r_rgt;
      assign c_src = (r == 0)      ? c_row_in[c][PIX_W-1 -: W] : c_q[r-1][c];
      assign r_top = (r == 0)      ? r_row_in[c][PIX_W-1 -: W] : r_q[r-1][c];
      assign r_bot = (r == MB - 1) ? r_row_in[c][PIX_W-1 -: W] : r_q[r+1][c];
      assign r_rgt = (c == MB - 1) ? r_col_in[r][PIX_W-1 -: W] : r_q[r][c+1];
      if (LOW_RES) begin : g_dpc
        logic m;
        dpc_pe u_pe (
          .clk, .load_c, .c_in(c_src), .load_r, .sel,
          .r_top, .r_bottom(r_bot), .r_right(r_rgt),
          .c_out(c_q[r][c]), .r_out(r_q[r][c]), .mismatch(m)
        );
        assign diff[r*MB + c] = pix_t'(m);
      end else begin : g_sad
        sad_pe u_pe (
          .clk, .load_c, .c_in(c_src), .load_r, .sel,
          .r_top, .r_bottom(r_bot), .r_right(r_rgt),
          .c_out(c_q[r][c]), .r_out(r_q[r][c]), .ad(diff[r*MB + c])
        );
      end
    end
  end

endmodule
