// dpc_pe: one processing element of the low-resolution (DPC) array.
//
// Difference pixel count works on the two most significant bits of each
// pixel (the other six are truncated). The PE holds a 2-bit current pixel
// and a 2-bit search pixel and outputs 1 when they differ: the two bits are
// XORed and the results ORed. Register loading and the three-way neighbour
// mux (top, bottom, right) work as in sad_pe, so both arrays scan the search
// window the same way. The 2-bit inputs, XOR/OR matching and 1-bit output
// follow the document; the enable encoding is this design's own.
// Timing: registers update on the rising clock edge; mismatch is
// combinational from the two registers.
module dpc_pe
  import me_pkg::*;
(
  input  logic   clk,
  input  logic   load_c,
  input  lrpix_t c_in,
  input  logic   load_r,
  input  rsel_e  sel,
  input  lrpix_t r_top,
  input  lrpix_t r_bottom,
  input  lrpix_t r_right,
  output lrpix_t c_out,
  output lrpix_t r_out,
  output logic   mismatch
);

  lrpix_t c_q, r_q, r_d;

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

  assign c_out    = c_q;
  assign r_out    = r_q;
  assign mismatch = |(c_q ^ r_q);

endmodule
