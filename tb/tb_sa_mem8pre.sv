// tb_sa_mem8pre: self-checking test of the bit-transposed search-area
// memory. A random 32x32 search area is written group by group; then rows
// and columns at random positions (aligned and unaligned to the 4-row
// groups) are read at low and full resolution and compared with the
// written pixels (low resolution: only bits [7:6]). Latencies are checked
// against the documented miss costs (3 clocks low, 6 full; 0 on a hit),
// and the bank-read counter against one word per four pixels at low
// resolution and one word per pixel at full resolution for row reads.
// Prefetch is checked too: a named row group or column fetched in the
// background is then read with no wait, and rows of the group the scan is
// using stay readable while another row buffer is being filled.
module tb_sa_mem8pre;
  import me_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        wr_valid = 1'b0, wr_ready;
  logic [4:0]  wr_x = '0;
  logic [2:0]  wr_g = '0;
  pix_t        wr_pix [4];
  logic        rd_req = 1'b0, rd_col = 1'b0, rd_full = 1'b0, rd_valid;
  logic [4:0]  rd_x = '0, rd_y = '0;
  logic        pf_req = 1'b0, pf_col = 1'b0;
  logic [4:0]  pf_x = '0, pf_y = '0;
  logic        pf_ready;
  pix_t        rd_data [MB];
  logic [31:0] bank_reads;

  sa_mem8pre #(.SA_W(32), .SA_H(32), .NB(16)) dut (.*);

  int checks = 0, failures = 0;
  int sa [32][32];

  initial begin
    repeat (20000) @(posedge clk);
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

  // Issue one read and return its latency in clocks (0 = answered at once).
  task automatic do_read(input bit col, input bit full, input int x, input int y,
                         output int lat);
    @(negedge clk);
    rd_req = 1'b1; rd_col = col; rd_full = full; rd_x = 5'(x); rd_y = 5'(y);
    lat = 0;
    #1;
    while (!rd_valid) begin
      @(negedge clk);
      lat++;
      #1;
    end
    for (int k = 0; k < MB; k++) begin
      int e;
      e = col ? sa[y + k][x] : sa[y][x + k];
      if (!full) e = e & 8'hC0;
      check($sformatf("%s %s (%0d,%0d) k%0d", col ? "col" : "row", full ? "full" : "low", x, y, k),
            int'(rd_data[k]), e);
    end
    @(negedge clk) rd_req = 1'b0;
  endtask

  initial begin
    int lat;
    int br0;
    for (int i = 0; i < 4; i++) wr_pix[i] = '0;
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) sa[y][x] = int'($urandom_range(0, 255));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 8; g++)
      for (int x = 0; x < 32; x++) begin
        @(negedge clk);
        while (!wr_ready) @(negedge clk);
        wr_valid = 1'b1; wr_x = 5'(x); wr_g = 3'(g);
        for (int i = 0; i < 4; i++) wr_pix[i] = pix_t'(sa[4*g + i][x]);
        @(negedge clk) wr_valid = 1'b0;
      end

    while (!wr_ready) @(negedge clk);
    // The transposed word format: plane 3 of group (x=0, g=0) in bank 0,
    // word 3, holds the two MSBs of rows 0..3.
    check("plane 3 word", int'(dut.g_bank[0].u_bank.mem[3]),
          ((sa[3][0] >> 6) << 6) | (((sa[2][0] >> 6) & 3) << 4) | (((sa[1][0] >> 6) & 3) << 2) | ((sa[0][0] >> 6) & 3));
    check("plane 0 word", int'(dut.g_bank[0].u_bank.mem[0]),
          ((sa[3][0] & 3) << 6) | ((sa[2][0] & 3) << 4) | ((sa[1][0] & 3) << 2) | (sa[0][0] & 3));

    // miss then hit, both resolutions
    br0 = int'(bank_reads);
    do_read(1'b0, 1'b0, 3, 8, lat);  check("low row miss latency", lat, 3);
    check("low row words read", int'(bank_reads) - br0, 16);
    do_read(1'b0, 1'b0, 3, 9, lat);  check("low row hit latency", lat, 0);
    br0 = int'(bank_reads);
    do_read(1'b0, 1'b1, 3, 10, lat); check("full row miss latency", lat, 6);
    check("full row words read", int'(bank_reads) - br0, 64);
    do_read(1'b0, 1'b1, 3, 11, lat); check("full row hit latency", lat, 0);
    do_read(1'b0, 1'b0, 3, 11, lat); check("low from full buffer", lat, 0);
    do_read(1'b1, 1'b0, 16, 5, lat); check("low col miss latency", lat, 3);
    do_read(1'b1, 1'b1, 16, 5, lat); check("full col miss latency", lat, 6);

    // prefetch of a row group, then of a column, while idle
    @(negedge clk);
    rd_full = 1'b1; pf_req = 1'b1; pf_col = 1'b0; pf_x = 5'd7; pf_y = 5'd20;
    repeat (6) @(negedge clk);
    pf_req = 1'b0;
    do_read(1'b0, 1'b1, 7, 21, lat); check("prefetched row latency", lat, 0);
    @(negedge clk);
    rd_full = 1'b0; pf_req = 1'b1; pf_col = 1'b1; pf_x = 5'd30; pf_y = 5'd3;
    repeat (3) @(negedge clk);
    pf_req = 1'b0;
    do_read(1'b1, 1'b0, 30, 3, lat); check("prefetched column latency", lat, 0);
    // rows of the group in use are answered while the next group is fetched
    do_read(1'b0, 1'b1, 2, 0, lat);
    @(negedge clk);
    rd_full = 1'b1; pf_req = 1'b1; pf_col = 1'b0; pf_x = 5'd2; pf_y = 5'd4;
    for (int r = 1; r < 4; r++) begin
      do_read(1'b0, 1'b1, 2, r, lat);
      check("hit during prefetch", lat, 0);
    end
    repeat (3) @(negedge clk);
    pf_req = 1'b0;
    do_read(1'b0, 1'b1, 2, 5, lat); check("next group ready", lat, 0);
    do_read(1'b0, 1'b1, 2, 1, lat); check("old group still held", lat, 0);

    // random reads
    for (int n = 0; n < 200; n++) begin
      int col, full, x, y;
      col  = int'($urandom_range(0, 1));
      full = int'($urandom_range(0, 1));
      if (col) begin x = int'($urandom_range(0, 31)); y = int'($urandom_range(0, 16)); end
      else     begin x = int'($urandom_range(0, 16)); y = int'($urandom_range(0, 31)); end
      do_read(col[0], full[0], x, y, lat);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
