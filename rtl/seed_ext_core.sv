// Seed-extension IP core.
//
// Scores one seed extension: a query string Q (up to MAX_QLEN bases)
// against a target string T (up to MAX_TLEN bases) with affine gap
// penalties, starting from the seed score h0, and reports the best cell
// like BWA-MEM's extension kernel does.
//
// The core owns three small memories: the query and target bases (written
// by the loader before `start`) and a boundary column (H and F for every
// target row). A PU array of N_PU columns handles the query in chunks of
// N_PU bases. For each chunk the core
//   LOAD  - loads every PU with its query base and its top boundary score,
//   RUN   - streams the target through the array, one row every
//           ROW_PERIOD cycles, and drives PU[0]'s left neighbour with the
//           boundary column,
//   DRAIN - waits for the last PU to finish the last row, while the last
//           PU's H/F of every row are stored as the next chunk's boundary,
//   REDUCE- merges the PU column bests into the running best.
// The first chunk starts from computed initial scores
// (max(0, h0 - open - extend*(k+1)) along both edges); later chunks start
// from the stored nonzero boundary, so a query longer than the array is
// scored exactly as if there were one PU per query base.
//
// Cells more than BAND_W rows off the diagonal are left out (banded
// dynamic programming); the band width is a parameter.
//
// Timing: a chunk takes ROW_PERIOD*(|T|-1) + N_PU + 5 cycles (load, row
// issue, drain through the chain and the three PU stages, reduction);
// `done` pulses, with `result` valid, 1 + chunks*(that) cycles after the
// clock edge that accepts `start`. Ties: the lowest query column, then the lowest
// target row, wins. The chunking, memory organisation, boundary formula
// and tie rule are this design's choices; the PU chain, its wavefront
// timing and the restart from nonzero initial values follow the text.
module seed_ext_core
  import bwa_pkg::*;
#(
  parameter int N_PU       = 30,
  parameter int MAX_QLEN   = 256,
  parameter int MAX_TLEN   = 256,
  parameter int ROW_PERIOD = 2,
  parameter int MATCH      = 1,
  parameter int MISMATCH   = 4,
  parameter int GAP_OPEN   = 6,
  parameter int GAP_EXT    = 1,
  parameter int BAND_W     = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  // memory fill (from the loader)
  input  logic        q_we,
  input  len_t        q_addr,
  input  base_e       q_base,
  input  logic        t_we,
  input  len_t        t_addr,
  input  base_e       t_base,
  // job control
  input  logic        start,
  input  len_t        qlen,
  input  len_t        tlen,
  input  score_t      h0,
  input  logic [15:0] tag,
  output logic        busy,
  output logic        done,
  output ext_result_t result
);

  localparam int QW     = $clog2(MAX_QLEN);
  localparam int TW     = $clog2(MAX_TLEN);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_REDUCE, S_DONE} core_state_e;
  core_state_e state;

  base_e  qmem  [MAX_QLEN];
  base_e  tmem  [MAX_TLEN];
  score_t bmem_h[MAX_TLEN];
  score_t bmem_f[MAX_TLEN];

  // job registers
  len_t        qlen_r, tlen_r;
  score_t      h0_r;
  logic [15:0] tag_r;
  len_t        cbase;          // first query column of the current chunk
  logic        first_chunk;
  len_t        row_issue;      // next target row to issue
  int unsigned period_cnt;
  logic        s1;             // a row started last cycle
  len_t        s1_row;
  len_t        wr_row;         // boundary rows written by the last PU
  score_t      best_score;
  len_t        best_q, best_t;
  score_t      gscore;

  // PU array
  logic   arr_load, arr_start;
  base_e  arr_tchar;
  base_e  ld_qchar  [N_PU];
  score_t ld_hinit  [N_PU];
  logic   ld_active [N_PU];
  len_t   ld_col    [N_PU];
  score_t bnd_h, bnd_f;
  score_t pu_h   [N_PU];
  score_t pu_f   [N_PU];
  logic   pu_done[N_PU];
  score_t pu_best[N_PU];
  len_t   pu_brow[N_PU];

  pu_array #(.N_PU(N_PU), .MATCH(MATCH), .MISMATCH(MISMATCH),
             .GAP_OPEN(GAP_OPEN), .GAP_EXT(GAP_EXT), .BAND_W(BAND_W)) u_array (
    .clk, .rst_n,
    .load        (arr_load),
    .load_qchar  (ld_qchar),
    .load_h_init (ld_hinit),
    .load_active (ld_active),
    .load_col    (ld_col),
    .in_start    (arr_start),
    .in_tchar    (arr_tchar),
    .bnd_h, .bnd_f,
    .h           (pu_h),
    .f           (pu_f),
    .row_done    (pu_done),
    .best        (pu_best),
    .best_row    (pu_brow)
  );

  // Initial score k+1 gap steps away from the seed end, floored at 0.
  function automatic score_t edge_score(input score_t s0, input int k);
    int v;
    v = int'(s0) - GAP_OPEN - GAP_EXT * (k + 1);
    return (v > 0) ? score_t'(v) : score_t'(0);
  endfunction

  // memory writes
  always_ff @(posedge clk) begin
    if (q_we) qmem[q_addr[QW-1:0]] <= q_base;
    if (t_we) tmem[t_addr[TW-1:0]] <= t_base;
    if (state == S_RUN || state == S_DRAIN) begin
      if (pu_done[N_PU-1]) begin
        bmem_h[wr_row[TW-1:0]] <= pu_h[N_PU-1];
        bmem_f[wr_row[TW-1:0]] <= pu_f[N_PU-1];
      end
    end
  end

  // PU loading values for the current chunk
  always_comb begin
    for (int i = 0; i < N_PU; i++) begin
      int col;
      col          = int'(cbase) + i;
      ld_active[i] = (col < int'(qlen_r));
      ld_col[i]    = len_t'(col);
      ld_qchar[i]  = (col < MAX_QLEN) ? qmem[col[QW-1:0]] : BASE_A;
      ld_hinit[i]  = edge_score(h0_r, col);
    end
  end

  assign arr_load  = (state == S_LOAD);
  assign arr_start = (state == S_RUN) && (period_cnt == 0);
  assign arr_tchar = tmem[row_issue[TW-1:0]];

  // reduction of the column bests of this chunk (lowest column wins ties)
  score_t red_score;
  len_t   red_q, red_t;
  always_comb begin
    red_score = best_score;
    red_q     = best_q;
    red_t     = best_t;
    for (int i = 0; i < N_PU; i++) begin
      if (int'(cbase) + i < int'(qlen_r) && pu_best[i] > red_score) begin
        red_score = pu_best[i];
        red_q     = len_t'(int'(cbase) + i + 1);
        red_t     = pu_brow[i];
      end
    end
  end

  // H of the last query column, valid after the last chunk has drained
  score_t last_col_h;
  always_comb begin
    last_col_h = h0_r;
    for (int i = 0; i < N_PU; i++)
      if (int'(cbase) + i == int'(qlen_r) - 1) last_col_h = pu_h[i];
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      qlen_r      <= '0;
      tlen_r      <= '0;
      h0_r        <= '0;
      tag_r       <= '0;
      cbase       <= '0;
      first_chunk <= 1'b1;
      row_issue   <= '0;
      period_cnt  <= 0;
      s1          <= 1'b0;
      s1_row      <= '0;
      wr_row      <= '0;
      bnd_h       <= '0;
      bnd_f       <= NEG_INF;
      best_score  <= '0;
      best_q      <= '0;
      best_t      <= '0;
      gscore      <= '0;
      done        <= 1'b0;
      result      <= '0;
    end else begin
      done <= 1'b0;
      s1   <= arr_start;
      if (arr_start) s1_row <= row_issue;
      // boundary column: previous row's value is the diagonal while PU[0]
      // scores; the current row's value is loaded for its writeback
      if (s1) begin
        if (first_chunk) begin
          bnd_h <= edge_score(h0_r, int'(s1_row));
          bnd_f <= NEG_INF;
        end else begin
          bnd_h <= bmem_h[s1_row[TW-1:0]];
          bnd_f <= bmem_f[s1_row[TW-1:0]];
        end
      end
      if ((state == S_RUN || state == S_DRAIN) && pu_done[N_PU-1])
        wr_row <= wr_row + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            qlen_r      <= qlen;
            tlen_r      <= tlen;
            h0_r        <= h0;
            tag_r       <= tag;
            cbase       <= '0;
            first_chunk <= 1'b1;
            best_score  <= h0;
            best_q      <= '0;
            best_t      <= '0;
            gscore      <= h0;
            state       <= (qlen == 0 || tlen == 0) ? S_DONE : S_LOAD;
          end
        end
        S_LOAD: begin
          row_issue  <= '0;
          period_cnt <= 0;
          wr_row     <= '0;
          // top-left corner: the seed itself, or the previous chunk's top
          bnd_h      <= first_chunk ? h0_r : edge_score(h0_r, int'(cbase) - 1);
          bnd_f      <= NEG_INF;
          state      <= S_RUN;
        end
        S_RUN: begin
          if (arr_start) begin
            row_issue  <= row_issue + 1'b1;
            period_cnt <= ROW_PERIOD - 1;
            if (row_issue + 1'b1 == tlen_r) state <= S_DRAIN;
          end else begin
            period_cnt <= period_cnt - 1;
          end
        end
        S_DRAIN: begin
          if (pu_done[N_PU-1] && wr_row + 1'b1 == tlen_r) state <= S_REDUCE;
        end
        S_REDUCE: begin
          best_score <= red_score;
          best_q     <= red_q;
          best_t     <= red_t;
          if (int'(cbase) + N_PU >= int'(qlen_r)) begin
            gscore <= last_col_h;
            state  <= S_DONE;
          end else begin
            cbase       <= cbase + len_t'(N_PU);
            first_chunk <= 1'b0;
            state       <= S_LOAD;
          end
        end
        S_DONE: begin
          done          <= 1'b1;
          result.tag    <= tag_r;
          result.score  <= best_score;
          result.qle    <= best_q;
          result.tle    <= best_t;
          result.gscore <= gscore;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_lengths: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (int'(qlen) <= MAX_QLEN && int'(tlen) <= MAX_TLEN));

endmodule
