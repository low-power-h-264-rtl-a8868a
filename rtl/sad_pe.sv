// sad_pe: one processing element of the full-resolution (SAD) array.
//
// It holds one current-macroblock pixel and one search-area pixel and outputs
// their absolute difference. The current-pixel register loads c_in when
// load_c is high and passes its value on through c_out to the PE below, so a
// macroblock shifts in row by row. The search-pixel register loads, when
// load_r is high, one of three neighbours chosen by sel: the PE above
// (r_top), the PE below (r_bottom) or the PE to the right (r_right). That
// lets the search window slide down, up or left by one pixel per clock.
// The register/mux/absolute-difference structure and the 8-bit widths follow
// the document's PE drawing; the enable encoding is this design's own.
// Timing: registers update on the rising clock edge; ad is combinational
// from the two registers.
module sad_pe
  import me_pkg::*;
(
  input  logic  clk,
  input  logic  load_c,
  input  pix_t  c_in,
  input  logic  load_r,
  input  rsel_e sel,
  input  pix_t  r_top,
  input  pix_t  r_bottom,
  input  pix_t  r_right,
  output pix_t  c_out,
  output pix_t  r_out,
  output pix_t  ad
);

  pix_t c_q, r_q, r_d;

  always_comb begin
    unique case (sel)
      R_FROM_TOP:    r_d = r_top;
      R_FROM_BOTTOM: r_d = r_bottom;
      default:       r_d = r_right;
    endcase
  end

  always_ff @(posedge clk) begin
    if (load_c) c_q <= c_in;
    if (load_r) r_q <= r_d;
  end

  assign c_out = c_q;
  assign r_out = r_q;
  assign ad    = (c_q > r_q) ? pix_t'(c_q - r_q) : pix_t'(r_q - c_q);

endmodule
