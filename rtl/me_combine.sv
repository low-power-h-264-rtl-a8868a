// me_combine: computation unit shared by the low- and full-resolution
// searches.
//
// Two PE arrays receive the same current macroblock and the same search
// pixels: 256 SAD PEs (8-bit absolute differences) and 256 DPC PEs (1-bit
// mismatches of the two MSBs). low_res selects which array's outputs reach
// the single adder tree, comparator unit and decision unit; the search
// pixels are loaded only into the selected array (load_r is gated), so the
// unused array does not switch. Both arrays load the current macroblock
// (load_c), so the refinement search after a low-resolution search needs
// no reload. The DPC mismatches enter the shared 8-bit adder tree
// zero-extended.
// The two arrays feeding one shared adder tree, comparator and decision
// unit through a mux are the document's; gating the idle array through its
// load enable is this design's own reading of "switched off".
// Timing: costs are combinational from the arrays; cmp_en samples them at
// the rising edge together with cand_mv; decision outputs follow decide by
// one clock (dec_valid).
module me_combine
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        low_res,
  input  logic        load_c,
  input  pix_t        c_row_in [MB],
  input  logic        load_r,
  input  rsel_e       sel,
  input  pix_t        r_row_in [MB],
  input  pix_t        r_col_in [MB],
  input  logic        cmp_clear,
  input  logic        cmp_en,
  input  mv_t         cand_mv,
  input  logic        decide,
  output cost_t       min_cost [NPART],
  output mv_t         best_mv  [NPART],
  output logic        dec_valid,
  output mb_mode_e    mb_mode,
  output sub_mode_e   sub_mode [4],
  output logic [COST_W+1:0] total_cost,
  output mv_t         mv_4x4 [16]
);

  pix_t  sad_diff [NPE];
  pix_t  dpc_diff [NPE];
  pix_t  tree_in  [NPE];
  cost_t cost     [NPART];

  pe_array #(.LOW_RES(1'b0)) u_sad_array (
    .clk, .load_c, .c_row_in, .load_r(load_r && !low_res), .sel,
    .r_row_in, .r_col_in, .diff(sad_diff)
  );

  pe_array #(.LOW_RES(1'b1)) u_dpc_array (
    .clk, .load_c, .c_row_in, .load_r(load_r && low_res), .sel,
    .r_row_in, .r_col_in, .diff(dpc_diff)
  );

  always_comb begin
    for (int i = 0; i < NPE; i++) tree_in[i] = low_res ? dpc_diff[i] : sad_diff[i];
  end

  adder_tree u_tree (.diff(tree_in), .cost);

  comparator_unit u_cmp (
    .clk, .rst_n, .clear(cmp_clear), .en(cmp_en), .cost, .mv(cand_mv),
    .min_cost, .best_mv
  );

  decision_unit u_dec (
    .clk, .rst_n, .decide, .min_cost, .best_mv,
    .valid(dec_valid), .mb_mode, .sub_mode, .total_cost, .mv_4x4
  );

endmodule
