// tb_cur_mb_mem: writes a random macroblock pixel by pixel, then reads all
// 16 rows in random order and checks each row one clock after the read
// enable; also checks that the output holds while rd_en is low.
module tb_cur_mb_mem;
  import me_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we = 1'b0, rd_en = 1'b0;
  logic [7:0] waddr = '0;
  pix_t       wdata = '0;
  logic [3:0] rd_row = '0;
  pix_t       rd_data [MB];

  cur_mb_mem dut (.*);

  int checks = 0, failures = 0;
  int m [16][16];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(input int r);
    for (int c = 0; c < 16; c++) begin
      checks++;
      if (int'(rd_data[c]) != m[r][c]) begin
        failures++;
        $display("FAIL row %0d col %0d: got %0d expected %0d", r, c, rd_data[c], m[r][c]);
      end
    end
  endtask

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        we = 1'b1; waddr = 8'(a); wdata = pix_t'($urandom_range(0, 255));
        m[a / 16][a % 16] = int'(wdata);
      end
      @(negedge clk) we = 1'b0;
      for (int n = 0; n < 32; n++) begin
        int r;
        r = int'($urandom_range(0, 15));
        rd_en = 1'b1; rd_row = 4'(r);
        @(negedge clk);
        rd_en = 1'b0; rd_row = 4'(r + 1);
        check_row(r);
        @(negedge clk);
        check_row(r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
