// search_centre: centre of the refinement (second) search.
//
// The first, low-resolution search gives one motion vector for each 8x8
// quadrant A, B, C, D of the macroblock. The second search is centred on the
// middle of the box that encloses them:
//   cx = (min(mvx) + max(mvx)) / 2,  cy = (min(mvy) + max(mvy)) / 2
// and searches [c - P2, c + P2 - 1] in each direction. The centre formula
// and P2 = P1/2 are the document's. Two points are this design's own: the
// halving rounds toward minus infinity (arithmetic shift), and the centre is
// clamped to [-(P1-P2), P1-P2] so that the whole second search area stays
// inside the first one, which is all the search-area memory holds.
// Timing: purely combinational.
module search_centre
  import me_pkg::*;
#(
  parameter int P1 = 8,
  parameter int P2 = 4
) (
  input  mv_t mv_8x8 [4],
  output mv_t centre
);

  function automatic mvc_t mid_clamp(input mvc_t a, input mvc_t b,
                                     input mvc_t c, input mvc_t d);
    mvc_t lo, hi;
    logic signed [MV_W:0] s;
    logic signed [MV_W:0] m;
    lo = a; hi = a;
    if (b < lo) lo = b;
    if (c < lo) lo = c;
    if (d < lo) lo = d;
    if (b > hi) hi = b;
    if (c > hi) hi = c;
    if (d > hi) hi = d;
    s = (MV_W+1)'(lo) + (MV_W+1)'(hi);
    m = s >>> 1;
    if (m > (MV_W+1)'(P1 - P2))  m = (MV_W+1)'(P1 - P2);
    if (m < -(MV_W+1)'(P1 - P2)) m = -(MV_W+1)'(P1 - P2);
    return mvc_t'(m);
  endfunction

  always_comb begin
    centre.x = mid_clamp(mv_8x8[0].x, mv_8x8[1].x, mv_8x8[2].x, mv_8x8[3].x);
    centre.y = mid_clamp(mv_8x8[0].y, mv_8x8[1].y, mv_8x8[2].y, mv_8x8[3].y);
  end

endmodule
