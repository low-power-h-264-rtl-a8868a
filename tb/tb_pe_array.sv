// tb_pe_array: checks the 16x16 PE array in both builds (SAD and DPC) side
// by side. A random current macroblock is shifted in from the top, then the
// search registers receive random sequences of row-from-bottom,
// row-from-top and column-from-right shifts, interleaved with idle clocks.
// A model of the register contents predicts every one of the 256 outputs of
// both arrays after every clock.
module tb_pe_array;
  import me_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  load_c = 1'b0, load_r = 1'b0;
  rsel_e sel = R_FROM_BOTTOM;
  pix_t  c_row_in [MB];
  pix_t  r_row_in [MB];
  pix_t  r_col_in [MB];
  pix_t  sad_diff [NPE];
  pix_t  dpc_diff [NPE];

  pe_array #(.LOW_RES(1'b0)) dut_sad (.clk, .load_c, .c_row_in, .load_r, .sel,
                                      .r_row_in, .r_col_in, .diff(sad_diff));
  pe_array #(.LOW_RES(1'b1)) dut_dpc (.clk, .load_c, .c_row_in, .load_r, .sel,
                                      .r_row_in, .r_col_in, .diff(dpc_diff));

  int checks = 0, failures = 0;
  int cm [16][16];
  int rm [16][16];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    int bad;
    bad = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int a, b, es, ed;
        a  = cm[r][c]; b = rm[r][c];
        es = (a > b) ? a - b : b - a;
        ed = ((a >> 6) != (b >> 6)) ? 1 : 0;
        checks += 2;
        if (int'(sad_diff[r*16 + c]) != es) bad++;
        if (int'(dpc_diff[r*16 + c]) != ed) bad++;
      end
    if (bad != 0) begin
      failures += bad;
      $display("FAIL %s: %0d mismatching outputs", what, bad);
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin c_row_in[k] = '0; r_row_in[k] = '0; r_col_in[k] = '0; end
    // load the current macroblock and a first search block (rows from the bottom)
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      load_c = 1'b1; load_r = 1'b1; sel = R_FROM_BOTTOM;
      for (int k = 0; k < 16; k++) begin
        c_row_in[k] = pix_t'($urandom_range(0, 255));
        r_row_in[k] = pix_t'($urandom_range(0, 255));
      end
      for (int r = 15; r > 0; r--) for (int c = 0; c < 16; c++) cm[r][c] = cm[r-1][c];
      for (int c = 0; c < 16; c++) cm[0][c] = int'(c_row_in[c]);
      for (int r = 0; r < 15; r++) for (int c = 0; c < 16; c++) rm[r][c] = rm[r+1][c];
      for (int c = 0; c < 16; c++) rm[15][c] = int'(r_row_in[c]);
    end
    @(negedge clk);
    load_c = 1'b0; load_r = 1'b0;
    #1 compare("after load");
    for (int n = 0; n < 300; n++) begin
      int op;
      op = int'($urandom_range(0, 3));
      for (int k = 0; k < 16; k++) begin
        r_row_in[k] = pix_t'($urandom_range(0, 255));
        r_col_in[k] = pix_t'($urandom_range(0, 255));
      end
      load_r = (op != 3);
      sel    = (op == 0) ? R_FROM_BOTTOM : (op == 1) ? R_FROM_TOP : R_FROM_RIGHT;
      unique case (op)
        0: begin
          for (int r = 0; r < 15; r++) for (int c = 0; c < 16; c++) rm[r][c] = rm[r+1][c];
          for (int c = 0; c < 16; c++) rm[15][c] = int'(r_row_in[c]);
        end
        1: begin
          for (int r = 15; r > 0; r--) for (int c = 0; c < 16; c++) rm[r][c] = rm[r-1][c];
          for (int c = 0; c < 16; c++) rm[0][c] = int'(r_row_in[c]);
        end
        2: begin
          for (int r = 0; r < 16; r++) for (int c = 0; c < 15; c++) rm[r][c] = rm[r][c+1];
          for (int r = 0; r < 16; r++) rm[r][15] = int'(r_col_in[r]);
        end
        default: ;
      endcase
      @(negedge clk);
      #1 compare($sformatf("step %0d op %0d", n, op));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
