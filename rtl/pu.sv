// Processing unit (PU): one query column of the banded affine-gap scoring
// matrix used by BWA-MEM seed extension.
//
// A PU holds one query base. The target string flows past it, one base per
// row, and for every target base the PU computes one cell H[row][col] in
// three steps, the stages of the optimised scoring loop:
//   preparing : select the candidates - compare the target base with the
//               query base (substitution score) and take its own previous
//               H and E (the cell above);
//   scoring   : the candidate sums - H1 = diag + substitution,
//               E1 = H_up - (open+extend), E2 = E_up - extend;
//   writeback : F1 = H_left - (open+extend), F2 = F_left - extend,
//               E = max(E1,E2), F = max(F1,F2), H = max(0, H1, E, F),
//               and the running best of the column is updated.
// The left neighbour starts the same row one cycle earlier, so while this
// PU scores, the neighbour's H register still holds the previous row
// (the diagonal cell), and while this PU writes back, the neighbour's
// H/F registers have just taken the current row (the left cell). The
// F candidates are therefore formed in writeback rather than in scoring,
// which is this design's timing choice. A new row may start every third
// cycle (in the cycle the previous one writes back).
//
// The matrix is banded: a cell whose row and column differ by more than
// BAND_W is forced to H = 0 with no open gaps, so no alignment passes
// through it.
//
// Interface: `load` sets the query base, its column index, the column's top boundary score
// h_init (the cell above the first row) and whether the column is part of
// the query. `in_start`/`in_tchar` start a row; they leave, registered, on
// `out_start`/`out_tchar` for the next PU. `h`/`f` are this column's
// latest H and F, `row_done` pulses in the cycle they become valid.
// `best`/`best_row` give the highest H seen in an active column and the
// number of target bases used to reach it (first row that reached it).
module pu
  import bwa_pkg::*;
#(
  parameter int MATCH    = 1,
  parameter int MISMATCH = 4,
  parameter int GAP_OPEN = 6,
  parameter int GAP_EXT  = 1,
  parameter int BAND_W   = 100
) (
  input  logic   clk,
  input  logic   rst_n,
  // column set-up
  input  logic   load,
  input  base_e  load_qchar,
  input  score_t load_h_init,
  input  logic   load_active,
  input  len_t   load_col,
  // row flow from the left neighbour
  input  logic   in_start,
  input  base_e  in_tchar,
  input  score_t left_h,
  input  score_t left_f,
  // row flow to the right neighbour
  output logic   out_start,
  output base_e  out_tchar,
  output score_t h,
  output score_t f,
  output logic   row_done,
  // column result
  output score_t best,
  output len_t   best_row
);

  localparam score_t OE = score_t'(GAP_OPEN + GAP_EXT);
  localparam score_t GE = score_t'(GAP_EXT);

  pu_stage_e stage;
  base_e     qchar;
  logic      active;
  len_t      col;          // query column index, for the band test
  score_t    e;            // E of the latest row (gap coming from above)
  len_t      rows;         // rows written back since load
  // preparing -> scoring
  score_t    sub_q;        // selected substitution score
  score_t    cand_h_up, cand_e_up;
  // scoring -> writeback
  score_t    h1, e1, e2;

  // writeback arithmetic
  score_t f1, f2, f_new, e_new, h_new;
  logic   in_band;
  always_comb begin
    in_band = (int'(rows) <= int'(col) + BAND_W) && (int'(col) <= int'(rows) + BAND_W);
    f1    = left_h - OE;
    f2    = left_f - GE;
    f_new = smax(f1, f2);
    e_new = smax(e1, e2);
    h_new = smax(smax(h1, 16'sd0), smax(e_new, f_new));
    if (!in_band) begin
      // outside the band: the cell is not part of any alignment
      f_new = NEG_INF;
      e_new = NEG_INF;
      h_new = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage     <= ST_IDLE;
      qchar     <= BASE_A;
      active    <= 1'b0;
      col       <= '0;
      h         <= '0;
      e         <= NEG_INF;
      f         <= NEG_INF;
      rows      <= '0;
      best      <= NEG_INF;
      best_row  <= '0;
      sub_q     <= '0;
      cand_h_up <= '0;
      cand_e_up <= NEG_INF;
      h1        <= '0;
      e1        <= NEG_INF;
      e2        <= NEG_INF;
      out_start <= 1'b0;
      out_tchar <= BASE_A;
      row_done  <= 1'b0;
    end else begin
      out_start <= in_start;
      out_tchar <= in_tchar;
      row_done  <= 1'b0;
      if (load) begin
        stage    <= ST_IDLE;
        qchar    <= load_qchar;
        active   <= load_active;
        col      <= load_col;
        h        <= load_h_init;
        e        <= NEG_INF;
        f        <= NEG_INF;
        rows     <= '0;
        best     <= NEG_INF;
        best_row <= '0;
      end else begin
        // writeback of the row in flight (may overlap the next preparing)
        if (stage == ST_WRITEBACK) begin
          h        <= h_new;
          e        <= e_new;
          f        <= f_new;
          rows     <= rows + 1'b1;
          row_done <= 1'b1;
          if (active && in_band && h_new > best) begin
            best     <= h_new;
            best_row <= rows + 1'b1;
          end
        end
        if (stage == ST_SCORING) begin
          h1    <= left_h + sub_q;      // left_h still holds the diagonal cell
          e1    <= cand_h_up - OE;
          e2    <= cand_e_up - GE;
          stage <= ST_WRITEBACK;
        end else if (in_start) begin
          sub_q     <= (in_tchar == qchar) ? score_t'(MATCH) : -score_t'(MISMATCH);
          cand_h_up <= (stage == ST_WRITEBACK) ? h_new : h;
          cand_e_up <= (stage == ST_WRITEBACK) ? e_new : e;
          stage     <= ST_SCORING;
        end else if (stage == ST_WRITEBACK) begin
          stage <= ST_IDLE;
        end
      end
    end
  end

  // A row may only start while the PU is idle or writing back.
  a_start_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    in_start |-> (stage == ST_IDLE || stage == ST_WRITEBACK));

endmodule
