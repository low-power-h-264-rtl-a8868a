// sa_mem8pre: search-area memory with bit-transposed storage.
//
// The search area (SA_W x SA_H 8-bit pixels, x to the right, y down) is kept
// in NB single-port 8-bit SRAM banks, SA_H*SA_W/NB words each, the same
// number of bits as a plain pixel-per-word memory. Pixels are stored in
// groups of four vertically adjacent pixels a, b, c, d (rows 4g..4g+3 of one
// column x). A group is transposed by bit pair into four words, plane
// p = 0..3 holding {d[2p+1:2p], c[2p+1:2p], b[2p+1:2p], a[2p+1:2p]}, so
// plane 3 holds the two MSBs of all four pixels.
//
// Placement ("ladder"): group (x, g) lives in bank (x + g) mod NB at word
// ((g*(SA_W/NB) + x/NB)*4 + p). Sixteen horizontally adjacent pixels of
// one row then sit in sixteen different banks, and the up to five groups
// that cover sixteen vertically adjacent pixels also sit in different
// banks, so a whole row or a whole column is fetched in parallel.
//
// Reads (rd_req held until rd_valid; rd_x, rd_y, rd_col, rd_full stable):
//   rd_col = 0: row rd_y, pixels x = rd_x .. rd_x+15 in rd_data[0..15];
//   rd_col = 1: column rd_x, pixels y = rd_y .. rd_y+15.
//   rd_full = 0 (low resolution): only plane 3 is read, one word per four
//     pixels; pixels come out as {2 MSBs, 6'b0}, the truncation of NTB = 6.
//   rd_full = 1: planes 0..3 are read in four clocks and reassembled into
//     8-bit pixels in a buffer.
// A row read fills one of three row buffers with the four rows of its group
// (4x16 pixels); further rows of that group are then answered from it in
// the same clock (rd_valid combinational). A column read fills a column
// buffer (the up to five groups it touches) the same way. A miss costs 3
// clocks at low resolution and 6 at full resolution before rd_valid. A
// fetch issues its bank reads in 1 (low) or 4 (full) clocks and the next
// fetch may start right after, while the last words are still captured,
// so a group of four rows is delivered every four clocks at full
// resolution and every clock at low resolution.
// Prefetch: pf_req with pf_col, pf_x, pf_y names a read that will come
// later (same resolution as rd_full). Unless a demand read misses, the
// memory fetches it in the background, also while a demand fetch is
// still being captured: row groups go into the three row buffers in turn
// (skipping the one serving the current hit), so the scan reads one group
// while the next is waiting and the one after that is fetched. pf_ready says the named read would hit.
// Writes: a group is offered on wr_pix (a..d = rows 4*wr_g .. 4*wr_g+3 of
// column wr_x) with wr_valid; wr_ready is high only when the memory is idle
// and no read is requested; the transpose unit then writes the four planes
// in four clocks. Writing invalidates all read buffers.
//
// The document gives the transposed format (four pixels per group, two bits
// of each per word, MSBs read alone in low resolution, four reads realigned
// by a buffer in full resolution), the 16 single-port 8-bit banks of
// H x W/N words and the ladder-like placement. Which four pixels form a
// group, the bank and address formulas, the buffers and the handshake are
// this design's own. bank_reads counts bank words read, for measuring
// memory traffic.
module sa_mem8pre
  import me_pkg::*;
#(
  parameter int SA_W = 32,
  parameter int SA_H = 32,
  parameter int NB   = MB,
  localparam int XW  = $clog2(SA_W),
  localparam int YW  = $clog2(SA_H),
  localparam int NRB = 3,
  localparam int NG  = SA_H / 4,
  localparam int GW  = $clog2(NG),
  localparam int WPB = SA_H * SA_W / NB,
  localparam int AW  = $clog2(WPB)
) (
  input  logic          clk,
  input  logic          rst_n,
  // group write (transpose unit)
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [XW-1:0] wr_x,
  input  logic [GW-1:0] wr_g,
  input  pix_t          wr_pix [4],
  // row / column read
  input  logic          rd_req,
  input  logic          rd_col,
  input  logic          rd_full,
  input  logic [XW-1:0] rd_x,
  input  logic [YW-1:0] rd_y,
  output logic          rd_valid,
  output pix_t          rd_data [MB],
  // prefetch hint
  input  logic          pf_req,
  input  logic          pf_col,
  input  logic [XW-1:0] pf_x,
  input  logic [YW-1:0] pf_y,
  output logic          pf_ready,
  output logic [31:0]   bank_reads
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_FETCH} state_e;
  state_e state;

  // SRAM bank wiring
  logic          b_en    [NB];
  logic          b_we    [NB];
  logic [AW-1:0] b_addr  [NB];
  pix_t          b_wdata [NB];
  pix_t          b_rdata [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    sram_sp #(.WORDS(WPB), .WIDTH(PIX_W)) u_bank (
      .clk, .en(b_en[b]), .we(b_we[b]), .addr(b_addr[b]),
      .wdata(b_wdata[b]), .rdata(b_rdata[b])
    );
  end

  function automatic logic [AW-1:0] word_addr(input int x, input int g, input int p);
    return AW'(((g * (SA_W / NB)) + x / NB) * 4 + p);
  endfunction

  // A fetch: what is read and into which buffer.
  typedef struct packed {
    logic          col;
    logic          full;
    logic [1:0]    buf_n;
    logic [XW-1:0] x;
    logic [YW-1:0] y;
  } fetch_t;

  // Latched write group
  logic [XW-1:0] w_x;
  logic [GW-1:0] w_g;
  pix_t          w_pix [4];
  logic [1:0]    w_pl;

  // Fetch being issued (q) and fetch whose words are being captured (cap)
  fetch_t        q, cap;
  logic [1:0]    pl, cap_pl;
  logic          cap_valid;

  // Buffers and their tags
  pix_t          rowbuf [NRB][4][MB];
  logic          row_tv [NRB];
  logic          row_tfull [NRB];
  logic [XW-1:0] row_tx [NRB];
  logic [GW-1:0] row_tg [NRB];
  logic [1:0]    rr;                 // next row buffer to refill (oldest)
  pix_t          colbuf [20];
  logic          col_tv, col_tfull;
  logic [XW-1:0] col_tx;
  logic [YW-1:0] col_ty;

  function automatic logic row_match(input logic [1:0] n, input logic [XW-1:0] x,
                                     input logic [GW-1:0] g, input logic full);
    return row_tv[n] && (row_tg[n] == g) && (row_tx[n] == x) && (row_tfull[n] || !full);
  endfunction

  function automatic logic any_hit(input logic col, input logic [XW-1:0] x,
                                   input logic [YW-1:0] y, input logic full);
    if (col) return col_tv && (col_ty == y) && (col_tx == x) && (col_tfull || !full);
    for (int n = 0; n < NRB; n++) if (row_match(2'(n), x, y[YW-1:2], full)) return 1'b1;
    return 1'b0;
  endfunction

  // Is this read already being fetched?
  function automatic logic same_fetch(input logic f_col, input logic f_full,
                                      input logic [XW-1:0] f_x, input logic [YW-1:0] f_y,
                                      input logic col, input logic [XW-1:0] x,
                                      input logic [YW-1:0] y, input logic full);
    if (f_col != col || f_x != x || (full && !f_full)) return 1'b0;
    if (col) return f_y == y;
    return f_y[YW-1:2] == y[YW-1:2];
  endfunction

  logic       hit, pf_hit, rd_busy, pf_busy;
  logic [1:0] hit_buf;
  assign hit     = any_hit(rd_col, rd_x, rd_y, rd_full);
  assign pf_hit  = any_hit(pf_col, pf_x, pf_y, rd_full);
  always_comb begin
    hit_buf = '0;
    for (int n = NRB - 1; n >= 0; n--)
      if (row_match(2'(n), rd_x, rd_y[YW-1:2], rd_full)) hit_buf = 2'(n);
  end
  assign rd_busy = ((state == S_FETCH) && same_fetch(q.col, q.full, q.x, q.y, rd_col, rd_x, rd_y, rd_full))
                || (cap_valid && same_fetch(cap.col, cap.full, cap.x, cap.y, rd_col, rd_x, rd_y, rd_full));
  assign pf_busy = ((state == S_FETCH) && same_fetch(q.col, q.full, q.x, q.y, pf_col, pf_x, pf_y, rd_full))
                || (cap_valid && same_fetch(cap.col, cap.full, cap.x, cap.y, pf_col, pf_x, pf_y, rd_full));

  assign rd_valid = rd_req && hit;
  assign pf_ready = pf_hit;
  assign wr_ready = (state == S_IDLE) && !rd_req && !pf_req && !cap_valid;

  // Row buffer to fill next: the one not serving the scan.
  logic [1:0] victim;
  always_comb begin
    victim = rr;
    if (rd_valid && !rd_col && hit_buf == rr) victim = (rr == 2'(NRB - 1)) ? 2'd0 : rr + 2'd1;
  end

  // What to fetch next, if anything.
  logic   start_dem, start_pf, victim_free;
  fetch_t nf;
  always_comb begin
    victim_free = !(cap_valid && !cap.col && cap.buf_n == victim);
    start_dem   = rd_req && !hit && !rd_busy;
    start_pf    = !start_dem && !(rd_req && !hit && !rd_busy) && pf_req && !pf_hit && !pf_busy;
    nf.col   = start_dem ? rd_col : pf_col;
    nf.full  = rd_full;
    nf.buf_n = victim;
    nf.x     = start_dem ? rd_x : pf_x;
    nf.y     = start_dem ? rd_y : pf_y;
    if (!nf.col && !victim_free) begin
      start_dem = 1'b0;
      start_pf  = 1'b0;
    end
  end

  always_comb begin
    for (int k = 0; k < MB; k++) begin
      pix_t p;
      if (rd_col) p = colbuf[int'(rd_y[1:0]) + k];
      else        p = rowbuf[hit_buf][rd_y[1:0]][k];
      rd_data[k] = rd_full ? p : (p & TRUNC_MASK);
    end
  end

  // Bank control
  logic [3:0] wb;
  int rg, rk, rx, cg0, cj;
  always_comb begin
    wb  = 4'((int'(w_x) + int'(w_g)) % NB);
    rg  = int'(q.y) / 4;
    cg0 = int'(q.y) / 4;
    rk  = 0;
    rx  = 0;
    cj  = 0;
    for (int b = 0; b < NB; b++) begin
      b_en[b]    = 1'b0;
      b_we[b]    = 1'b0;
      b_addr[b]  = '0;
      b_wdata[b] = '0;
    end
    if (state == S_WRITE) begin
      b_en[wb]   = 1'b1;
      b_we[wb]   = 1'b1;
      b_addr[wb] = word_addr(int'(w_x), int'(w_g), int'(w_pl));
      for (int i = 0; i < 4; i++)
        b_wdata[wb][2*i +: 2] = w_pix[i][2*w_pl +: 2];
    end else if (state == S_FETCH) begin
      for (int b = 0; b < NB; b++) begin
        if (!q.col) begin
          rk = (b - rg - int'(q.x) + 2*NB*NB) % NB;
          rx = int'(q.x) + rk;
          if (rx < SA_W) begin
            b_en[b]   = 1'b1;
            b_addr[b] = word_addr(rx, rg, int'(pl));
          end
        end else begin
          cj = (b - int'(q.x) - cg0 + 2*NB*NB) % NB;
          if (cj < 5 && cg0 + cj < NG) begin
            b_en[b]   = 1'b1;
            b_addr[b] = word_addr(int'(q.x), cg0 + cj, int'(pl));
          end
        end
      end
    end
  end

  // Bank index feeding each buffer lane (row) or group (column).
  logic [3:0] row_bank [MB];
  logic [3:0] col_bank [5];
  int n_en;
  always_comb begin
    for (int k = 0; k < MB; k++) row_bank[k] = 4'((int'(cap.x) + k + int'(cap.y) / 4) % NB);
    for (int j = 0; j < 5; j++)  col_bank[j] = 4'((int'(cap.x) + int'(cap.y) / 4 + j) % NB);
    n_en = 0;
    for (int b = 0; b < NB; b++) n_en += int'(b_en[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      w_x        <= '0;
      w_g        <= '0;
      w_pl       <= '0;
      q          <= '0;
      cap        <= '0;
      pl         <= '0;
      cap_pl     <= '0;
      cap_valid  <= 1'b0;
      rr         <= '0;
      col_tv     <= 1'b0;
      col_tfull  <= 1'b0;
      col_tx     <= '0;
      col_ty     <= '0;
      bank_reads <= '0;
      for (int n = 0; n < NRB; n++) begin
        row_tv[n]    <= 1'b0;
        row_tfull[n] <= 1'b0;
        row_tx[n]    <= '0;
        row_tg[n]    <= '0;
      end
      for (int i = 0; i < 4; i++) begin
        w_pix[i] <= '0;
        for (int k = 0; k < MB; k++)
          for (int n = 0; n < NRB; n++) rowbuf[n][i][k] <= '0;
      end
      for (int i = 0; i < 20; i++) colbuf[i] <= '0;
    end else begin
      // Capture the words read in the previous clock; the buffer's tag
      // becomes valid with its last plane.
      cap_valid <= (state == S_FETCH);
      cap_pl    <= pl;
      if (state == S_FETCH) cap <= q;
      if (cap_valid) begin
        if (!cap.col) begin
          for (int k = 0; k < MB; k++)
            for (int i = 0; i < 4; i++)
              rowbuf[cap.buf_n][i][k][2*cap_pl +: 2] <= b_rdata[row_bank[k]][2*i +: 2];
          if (cap_pl == 2'd3) begin
            row_tv[cap.buf_n]    <= 1'b1;
            row_tfull[cap.buf_n] <= cap.full;
            row_tx[cap.buf_n]    <= cap.x;
            row_tg[cap.buf_n]    <= cap.y[YW-1:2];
          end
        end else begin
          for (int j = 0; j < 5; j++)
            for (int i = 0; i < 4; i++)
              colbuf[4*j + i][2*cap_pl +: 2] <= b_rdata[col_bank[j]][2*i +: 2];
          if (cap_pl == 2'd3) begin
            col_tv    <= 1'b1;
            col_tfull <= cap.full;
            col_tx    <= cap.x;
            col_ty    <= cap.y;
          end
        end
      end

      if (state == S_FETCH) bank_reads <= bank_reads + 32'(n_en);

      unique case (state)
        S_IDLE, S_FETCH: begin
          if (state == S_FETCH && pl != 2'd3) begin
            pl <= pl + 2'd1;
          end else if (start_dem || start_pf) begin
            // demand miss first, otherwise prefetch; a new fetch may follow
            // the previous one's last issue directly
            q     <= nf;
            pl    <= rd_full ? 2'd0 : 2'd3;
            if (nf.col) col_tv <= 1'b0;
            else begin
              row_tv[nf.buf_n] <= 1'b0;
              rr <= (nf.buf_n == 2'(NRB - 1)) ? 2'd0 : nf.buf_n + 2'd1;
            end
            state <= S_FETCH;
          end else if (state == S_IDLE && !rd_req && !pf_req && !cap_valid && wr_valid) begin
            w_x       <= wr_x;
            w_g       <= wr_g;
            w_pix     <= wr_pix;
            w_pl      <= '0;
            for (int n = 0; n < NRB; n++) row_tv[n] <= 1'b0;
            col_tv    <= 1'b0;
            state     <= S_WRITE;
          end else begin
            state <= S_IDLE;
          end
        end
        S_WRITE: begin
          w_pl <= w_pl + 2'd1;
          if (w_pl == 2'd3) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
