// Systolic chain of processing units.
//
// PU[i] holds query base i of the current query chunk. The target string
// enters at PU[0] and moves one PU per clock cycle, so PU[i] works on row
// j one cycle after PU[i-1]: the scoring matrix is swept as a diagonal
// wavefront and |Q|+|T| steps replace |Q|*|T|. Each PU reads its left
// neighbour's H and F registers directly (the diagonal cell while it
// scores, the left cell while it writes back). PU[0]'s left neighbour is
// the boundary column (bnd_h, bnd_f), which the core drives with the
// same timing as a PU would: it must hold H[j-1][-1] in the cycle after a
// row starts and H[j][-1]/F[j][-1] in the cycle after that.
//
// All PUs are loaded in parallel by a single `load` pulse.
module pu_array
  import bwa_pkg::*;
#(
  parameter int N_PU     = 30,
  parameter int MATCH    = 1,
  parameter int MISMATCH = 4,
  parameter int GAP_OPEN = 6,
  parameter int GAP_EXT  = 1,
  parameter int BAND_W   = 100
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  base_e  load_qchar  [N_PU],
  input  score_t load_h_init [N_PU],
  input  logic   load_active [N_PU],
  input  len_t   load_col    [N_PU],
  input  logic   in_start,
  input  base_e  in_tchar,
  input  score_t bnd_h,
  input  score_t bnd_f,
  output score_t h        [N_PU],
  output score_t f        [N_PU],
  output logic   row_done [N_PU],
  output score_t best     [N_PU],
  output len_t   best_row [N_PU]
);

  logic   start_chain [N_PU+1];
  base_e  tchar_chain [N_PU+1];
  score_t h_chain     [N_PU+1];
  score_t f_chain     [N_PU+1];

  assign start_chain[0] = in_start;
  assign tchar_chain[0] = in_tchar;
  assign h_chain[0]     = bnd_h;
  assign f_chain[0]     = bnd_f;

  for (genvar i = 0; i < N_PU; i++) begin : g_pu
    pu #(.MATCH(MATCH), .MISMATCH(MISMATCH), .GAP_OPEN(GAP_OPEN), .GAP_EXT(GAP_EXT), .BAND_W(BAND_W)) u_pu (
      .clk, .rst_n,
      .load,
      .load_qchar  (load_qchar[i]),
      .load_h_init (load_h_init[i]),
      .load_active (load_active[i]),
      .load_col    (load_col[i]),
      .in_start    (start_chain[i]),
      .in_tchar    (tchar_chain[i]),
      .left_h      (h_chain[i]),
      .left_f      (f_chain[i]),
      .out_start   (start_chain[i+1]),
      .out_tchar   (tchar_chain[i+1]),
      .h           (h_chain[i+1]),
      .f           (f_chain[i+1]),
      .row_done    (row_done[i]),
      .best        (best[i]),
      .best_row    (best_row[i])
    );
    assign h[i] = h_chain[i+1];
    assign f[i] = f_chain[i+1];
  end

endmodule
