// adder_tree: sums the 256 PE outputs into the costs of all 41 partitions.
//
// diff[r*16 + c] is the PE output for macroblock row r, column c. The tree
// first forms the sixteen 4x4 sums, then reuses them: two 4x4 sums make an
// 8x4 or 4x8 cost, four make an 8x8, two 8x8 make a 16x8 or 8x16, and the
// two 16x8 make the 16x16. Partition numbering is given in me_pkg. With
// 8-bit SAD inputs the sums are 12 (4x4) to 16 (16x16) bits; with the 1-bit
// DPC inputs of the low-resolution search only the low 5 to 9 bits are ever
// non-zero. All costs leave on cost_t (16 bits). Reusing 4x4 sums and the
// 41 outputs per clock follow the document; the order of additions inside a
// 4x4 block is this design's own.
// Timing: purely combinational.
module adder_tree
  import me_pkg::*;
(
  input  pix_t  diff [NPE],
  output cost_t cost [NPART]
);

  cost_t s4 [4][4];

  always_comb begin
    for (int by = 0; by < 4; by++) begin
      for (int bx = 0; bx < 4; bx++) begin
        s4[by][bx] = '0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            s4[by][bx] += cost_t'(diff[(by*4 + r)*MB + bx*4 + c]);
      end
    end

    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++)
        cost[p4x4(by, bx)] = s4[by][bx];
    for (int by = 0; by < 4; by++)
      for (int bx8 = 0; bx8 < 2; bx8++)
        cost[p8x4(by, bx8)] = s4[by][2*bx8] + s4[by][2*bx8 + 1];
    for (int by8 = 0; by8 < 2; by8++)
      for (int bx = 0; bx < 4; bx++)
        cost[p4x8(by8, bx)] = s4[2*by8][bx] + s4[2*by8 + 1][bx];
    for (int by8 = 0; by8 < 2; by8++)
      for (int bx8 = 0; bx8 < 2; bx8++)
        cost[p8x8(by8, bx8)] = cost[p8x4(2*by8, bx8)] + cost[p8x4(2*by8 + 1, bx8)];
    for (int by8 = 0; by8 < 2; by8++)
      cost[p16x8(by8)] = cost[p8x8(by8, 0)] + cost[p8x8(by8, 1)];
    for (int bx8 = 0; bx8 < 2; bx8++)
      cost[p8x16(bx8)] = cost[p8x8(0, bx8)] + cost[p8x8(1, bx8)];
    cost[P16X16] = cost[p16x8(0)] + cost[p16x8(1)];
  end

endmodule
