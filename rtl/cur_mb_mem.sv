// cur_mb_mem: current-macroblock memory.
//
// Holds the 16x16 macroblock being predicted. It is written one pixel per
// clock (we, waddr = row*16 + column, wdata) and read one whole row of 16
// pixels per clock: rd_row selects the row and rd_data shows it one clock
// after rd_en (synchronous read, like an SRAM). The document only names this
// memory; the pixel-wide write and row-wide read are this design's own,
// chosen so the PE arrays can load one macroblock row per clock.
module cur_mb_mem
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [7:0] waddr,
  input  pix_t       wdata,
  input  logic       rd_en,
  input  logic [3:0] rd_row,
  output pix_t       rd_data [MB]
);

  pix_t mem [MB][MB];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[7:4]][waddr[3:0]] <= wdata;
    if (rd_en) begin
      for (int c = 0; c < MB; c++) rd_data[c] <= mem[rd_row][c];
    end
  end

endmodule
