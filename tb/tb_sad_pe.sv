// tb_sad_pe: checks one SAD processing element: loading of the current and
// search registers, the three-way neighbour mux, hold when the enables are
// low, and the 8-bit absolute difference, over random operands.
module tb_sad_pe;
  import me_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  load_c = 1'b0, load_r = 1'b0;
  rsel_e sel = R_FROM_TOP;
  pix_t  c_in = '0, r_top = '0, r_bottom = '0, r_right = '0;
  pix_t  c_out, r_out, ad;

  sad_pe dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int ec, er;
    ec = 0; er = 0;
    // initialise both registers
    @(negedge clk);
    load_c = 1'b1; load_r = 1'b1; sel = R_FROM_TOP; c_in = 8'd0; r_top = 8'd0;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      int s;
      load_c   = 1'($urandom_range(0, 1));
      load_r   = 1'($urandom_range(0, 1));
      s        = int'($urandom_range(0, 2));
      sel      = rsel_e'(s);
      c_in     = pix_t'($urandom_range(0, 255));
      r_top    = pix_t'($urandom_range(0, 255));
      r_bottom = pix_t'($urandom_range(0, 255));
      r_right  = pix_t'($urandom_range(0, 255));
      if (load_c) ec = int'(c_in);
      if (load_r) er = (s == 0) ? int'(r_top) : (s == 1) ? int'(r_bottom) : int'(r_right);
      @(negedge clk);
      check("c_out", int'(c_out), ec);
      check("r_out", int'(r_out), er);
      check("ad", int'(ad), (ec > er) ? ec - er : er - ec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
