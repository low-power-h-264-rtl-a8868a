// me_mc_m8p: low-power integer motion estimator for one 16x16 macroblock,
// built from the shared computation unit (me_combine) and the bit-transposed
// search-area memory (sa_mem8pre).
//
// Two search modes, chosen per macroblock by two_step at start:
//   two_step = 0  conventional full search: every candidate in [-P1, P1-1]
//                 in both directions is matched with 8-bit SAD.
//   two_step = 1  two-step search:
//                 1. low resolution: every candidate in [-P1, P1-1] is
//                    matched with the difference pixel count of the two
//                    MSBs (six bits truncated); only the four 8x8 vectors
//                    (A, B, C, D) are kept;
//                 2. refinement: search_centre turns those four vectors into
//                    a centre c, and every candidate in [c-P2, c+P2-1] is
//                    matched with 8-bit SAD for all 41 partitions.
// In both modes the decision unit then reports the best partition and the
// motion vector of each 4x4 block.
//
// Operation. Before start, the current macroblock is written into cur_mb_mem
// (cur_we/cur_waddr/cur_wdata) and the (2*P1+15)x(2*P1+15) search area,
// whose top-left pixel is displacement (-P1, -P1), into sa_mem8pre in
// groups of four vertically adjacent pixels (sa_wr_*). A start pulse then
// runs: load the current macroblock into both PE arrays (16 rows, bottom
// row first); load the first candidate's 16 rows; scan. The scan is a
// vertical serpentine: down the first column of candidates, one step right,
// up the next column, and so on, so each move needs one new search-area row
// (entering at the bottom or top of the array) or, at a column change, one
// new column (entering at the right). Each candidate is evaluated in the
// clock its pixels are in the array; the next row or column is requested in
// the same clock, and when the memory answers at once the array moves at
// one candidate per clock. When a memory buffer misses, the scan waits.
// While scanning, the controller also names the next read it will need
// (the next row group of the column, then the column for the step right,
// then the first row of the next column) as a prefetch hint, so the memory
// fetches it in the background. With the default sizes a macroblock takes
// at most about 410 clocks in full search and 470 in two-step search
// (measured by the testbench), inside the document's "less than 500 clock
// cycles to process one macroblock".
// done pulses for one clock when the results are valid; they hold until
// the next start.
//
// The two-step algorithm, the search ranges (P1 = 8, P2 = P1/2), the
// me_combine and mem8pre structure, the DPC and SAD matching and the second
// search centre are the document's. The serpentine scan order, the load
// sequence, the handshake with the memory and the start/done protocol are
// this design's own. bank_reads counts search-area memory words read and
// cycles counts the clocks from start to done. The per-partition minimum
// costs of me_combine are not used here (only the decision is output), so
// the linter reports min_cost as unused.
module me_mc_m8p
  import me_pkg::*;
#(
  parameter int P1 = 8,
  parameter int P2 = P1 / 2,
  localparam int SA_N = 2 * P1 + MB,        // SA memory side (one spare row/column)
  localparam int XW   = $clog2(SA_N),
  localparam int GW   = $clog2(SA_N / 4)
) (
  input  logic                clk,
  input  logic                rst_n,
  // current macroblock write
  input  logic                cur_we,
  input  logic [7:0]          cur_waddr,
  input  pix_t                cur_wdata,
  // search area group write
  input  logic                sa_wr_valid,
  output logic                sa_wr_ready,
  input  logic [XW-1:0]       sa_wr_x,
  input  logic [GW-1:0]       sa_wr_g,
  input  pix_t                sa_wr_pix [4],
  // control
  input  logic                start,
  input  logic                two_step,
  output logic                busy,
  output logic                done,
  // results
  output mb_mode_e            mb_mode,
  output sub_mode_e           sub_mode [4],
  output logic [COST_W+1:0]   total_cost,
  output mv_t                 mv_4x4 [16],
  output mv_t                 centre,
  output logic [31:0]         bank_reads,
  output logic [15:0]         cycles
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_SCAN, S_NEXT, S_DECIDE, S_WAIT
  } state_e;

  state_e state;

  logic   low_res;                 // current pass is the low-resolution one

  // ---------------------------------------------------------------- memories
  logic  cur_rd_en;
  logic [3:0] cur_rd_row;
  pix_t  cur_row [MB];

  cur_mb_mem u_cur (
    .clk, .we(cur_we), .waddr(cur_waddr), .wdata(cur_wdata),
    .rd_en(cur_rd_en), .rd_row(cur_rd_row), .rd_data(cur_row)
  );

  logic          rd_req, rd_col, rd_valid;
  logic [XW-1:0] rd_x;
  logic [XW-1:0] rd_y;
  logic          pf_req, pf_col, pf_ready;
  logic [XW-1:0] pf_x;
  logic [XW-1:0] pf_y;
  pix_t          rd_data [MB];

  sa_mem8pre #(.SA_W(SA_N), .SA_H(SA_N), .NB(MB)) u_sa (
    .clk, .rst_n,
    .wr_valid(sa_wr_valid), .wr_ready(sa_wr_ready), .wr_x(sa_wr_x),
    .wr_g(sa_wr_g), .wr_pix(sa_wr_pix),
    .rd_req, .rd_col, .rd_full(!low_res), .rd_x, .rd_y,
    .pf_req, .pf_col, .pf_x, .pf_y, .pf_ready,
    .rd_valid, .rd_data, .bank_reads
  );

  // -------------------------------------------------------- computation unit
  logic   load_c, load_r, cmp_clear, cmp_en, decide, dec_valid;
  rsel_e  sel;
  mv_t    cand_mv;
  cost_t  min_cost [NPART];
  mv_t    best_mv  [NPART];

  me_combine u_comp (
    .clk, .rst_n, .low_res,
    .load_c, .c_row_in(cur_row),
    .load_r, .sel, .r_row_in(rd_data), .r_col_in(rd_data),
    .cmp_clear, .cmp_en, .cand_mv, .decide,
    .min_cost, .best_mv,
    .dec_valid, .mb_mode, .sub_mode, .total_cost, .mv_4x4
  );

  mv_t mv_8x8 [4];
  mv_t centre_d;
  always_comb for (int q = 0; q < 4; q++) mv_8x8[q] = best_mv[p8x8(q / 2, q % 2)];

  search_centre #(.P1(P1), .P2(P2)) u_centre (.mv_8x8, .centre(centre_d));

  // ---------------------------------------------------------- scan control
  logic       mode_two, phase2;
  mv_t        ctr;                 // centre of the current pass
  logic [5:0] rng;                 // half range of the current pass (P1 or P2)
  logic [4:0] cnt;                 // search-row load counter
  logic [4:0] ccnt;                // current-macroblock load counter
  logic       cur_load;            // current macroblock is being loaded
  logic [5:0] ci, cj;              // candidate column / row within the pass
  logic       pending;             // array holds a candidate not yet evaluated
  logic       col_pf_done;         // next column is already in the memory buffer

  // search-area coordinates of the array's top-left pixel
  logic signed [7:0] x0, y0, ax, ay;
  assign x0 = 8'(ctr.x) - 8'(rng) + 8'(P1);
  assign y0 = 8'(ctr.y) - 8'(rng) + 8'(P1);
  assign ax = x0 + 8'(ci);
  assign ay = y0 + 8'(cj);

  logic last_col, down, at_end_of_col, last_cand;
  assign last_col      = (ci == 6'(2*rng - 1));
  assign down          = !ci[0];
  assign at_end_of_col = down ? (cj == 6'(2*rng - 1)) : (cj == 6'd0);
  assign last_cand     = last_col && at_end_of_col;

  always_comb begin
    cand_mv.x = mvc_t'(ctr.x - mvc_t'(rng) + mvc_t'(ci));
    cand_mv.y = mvc_t'(ctr.y - mvc_t'(rng) + mvc_t'(cj));
  end

  // memory request and array moves
  logic signed [7:0] ny, last_row;
  always_comb begin
    rd_req     = 1'b0;
    rd_col     = 1'b0;
    rd_x       = XW'(ax);
    rd_y       = XW'(ay);
    pf_req     = 1'b0;
    pf_col     = 1'b0;
    pf_x       = XW'(ax);
    pf_y       = XW'(ay);
    sel        = R_FROM_BOTTOM;
    load_r     = 1'b0;
    load_c     = cur_load && (ccnt != 0);
    cur_rd_en  = cur_load && (ccnt < 5'(MB));
    cur_rd_row = 4'(MB - 1 - int'(ccnt));
    cmp_en     = 1'b0;
    decide     = 1'b0;
    ny         = '0;
    last_row   = y0 + 8'(2*rng - 1) + 8'(MB - 1);
    unique case (state)
      S_INIT: begin
        // rows y0 .. y0+15 enter from the bottom; prefetch the next group
        rd_req = (cnt < 5'(MB));
        rd_x   = XW'(x0);
        rd_y   = XW'(y0 + 8'(cnt));
        load_r = rd_req && rd_valid;
        pf_req = 1'b1;
        pf_x   = XW'(x0);
        pf_y   = XW'(((y0 + 8'(cnt)) | 8'sd3) + 8'sd1);
      end
      S_SCAN: begin
        cmp_en = pending;
        if (!last_cand) begin
          rd_req = 1'b1;
          if (!at_end_of_col) begin
            rd_y = down ? XW'(ay + 8'(MB)) : XW'(ay - 8'd1);
            sel  = down ? R_FROM_BOTTOM : R_FROM_TOP;
            // prefetch the next row group of this column, or else the
            // column needed to step right
            if (down) begin
              ny = ((ay + 8'(MB)) | 8'sd3) + 8'sd1;
              if (ny <= last_row) begin
                pf_req = 1'b1;
                pf_y   = XW'(ny);
              end else if (!last_col && col_pf_done) begin
                pf_req = 1'b1;
                pf_x   = XW'(ax + 8'sd1);
                pf_y   = XW'(y0 + 8'(2*rng - 2));
              end else if (!last_col) begin
                pf_req = 1'b1;
                pf_col = 1'b1;
                pf_x   = XW'(ax + 8'(MB));
                pf_y   = XW'(y0 + 8'(2*rng - 1));
              end
            end else begin
              ny = ((ay - 8'sd1) & ~8'sd3) - 8'sd1;
              if (ny >= y0) begin
                pf_req = 1'b1;
                pf_y   = XW'(ny);
              end else if (!last_col && col_pf_done) begin
                pf_req = 1'b1;
                pf_x   = XW'(ax + 8'sd1);
                pf_y   = XW'(y0 + 8'(MB));
              end else if (!last_col) begin
                pf_req = 1'b1;
                pf_col = 1'b1;
                pf_x   = XW'(ax + 8'(MB));
                pf_y   = XW'(y0);
              end
            end
          end else begin
            rd_col = 1'b1;
            rd_x   = XW'(ax + 8'(MB));
            sel    = R_FROM_RIGHT;
            // prefetch the first row the next column will need
            pf_req = 1'b1;
            pf_x   = XW'(ax + 8'sd1);
            pf_y   = down ? XW'(ay - 8'sd1) : XW'(ay + 8'(MB));
          end
          load_r = rd_valid;
        end
      end
      S_DECIDE: decide = 1'b1;
      default: ;
    endcase
  end

  assign cmp_clear = ((state == S_IDLE) && start) || ((state == S_NEXT) && mode_two && !phase2);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mode_two <= 1'b0;
      phase2   <= 1'b0;
      low_res  <= 1'b0;
      ctr      <= '0;
      rng      <= 6'(P1);
      cnt      <= '0;
      ccnt     <= '0;
      cur_load <= 1'b0;
      ci       <= '0;
      cj       <= '0;
      pending  <= 1'b0;
      col_pf_done <= 1'b0;
      done     <= 1'b0;
      centre   <= '0;
      cycles   <= '0;
    end else begin
      done <= 1'b0;
      if (busy) cycles <= cycles + 16'd1;
      // once the column for the next step right is buffered, the hint
      // moves on to the first row of the next column
      if (state == S_SCAN && pf_req && pf_col && pf_ready) col_pf_done <= 1'b1;
      if (state != S_SCAN || (load_r && sel == R_FROM_RIGHT)) col_pf_done <= 1'b0;
      if (cur_load) begin
        ccnt <= ccnt + 5'd1;
        if (ccnt == 5'(MB)) cur_load <= 1'b0;
      end
      unique case (state)
        S_IDLE: begin
          if (start) begin
            mode_two <= two_step;
            low_res  <= two_step;
            phase2   <= 1'b0;
            ctr      <= '0;
            centre   <= '0;
            rng      <= 6'(P1);
            cnt      <= '0;
            ccnt     <= '0;
            cur_load <= 1'b1;
            ci       <= '0;
            cj       <= '0;
            cycles   <= '0;
            state    <= S_INIT;
          end
        end
        S_INIT: begin
          if (load_r) cnt <= cnt + 5'd1;
          if (cnt == 5'(MB) && !cur_load) begin
            cnt     <= '0;
            ci      <= '0;
            cj      <= '0;
            pending <= 1'b1;
            state   <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (last_cand) begin
            pending <= 1'b0;
            state   <= S_NEXT;
          end else if (rd_valid) begin
            pending <= 1'b1;
            if (!at_end_of_col) cj <= down ? cj + 6'd1 : cj - 6'd1;
            else                ci <= ci + 6'd1;
          end else begin
            pending <= 1'b0;
          end
        end
        S_NEXT: begin
          if (mode_two && !phase2) begin
            // refinement pass around the centre of the four 8x8 vectors
            phase2  <= 1'b1;
            low_res <= 1'b0;
            ctr     <= centre_d;
            centre  <= centre_d;
            rng     <= 6'(P2);
            cnt     <= '0;
            ci      <= '0;
            cj      <= '0;
            state   <= S_INIT;
          end else begin
            state <= S_DECIDE;
          end
        end
        S_DECIDE: state <= S_WAIT;
        S_WAIT: begin
          if (dec_valid) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
