// Shared types and constants of the BWA-MEM seed-extension accelerator.
//
// Bases are coded on two bits (A=0, C=1, G=2, T=3). Scores are signed
// 16-bit numbers; NEG_INF stands for "no gap open here" and is far enough
// from the numeric range that subtracting gap penalties never wraps.
// The scoring scheme (match, mismatch, gap open, gap extend) is not fixed
// by the accelerator's description; the defaults below are those of the
// BWA-MEM software (match 1, mismatch 4, open 6, extend 1) and are
// parameters of the modules that use them.
package bwa_pkg;

  typedef enum logic [1:0] {BASE_A = 2'd0, BASE_C = 2'd1, BASE_G = 2'd2, BASE_T = 2'd3} base_e;

  localparam int unsigned SCORE_W = 16;
  typedef logic signed [SCORE_W-1:0] score_t;

  localparam score_t NEG_INF = -16'sd16384;

  // Length fields of a job (query and target lengths, positions).
  localparam int unsigned LEN_W = 16;
  typedef logic [LEN_W-1:0] len_t;

  // Stage of the row a processing unit holds after its preparing step
  // (preparing itself happens in the cycle a row starts).
  typedef enum logic [1:0] {ST_IDLE, ST_SCORING, ST_WRITEBACK} pu_stage_e;

  // Outcome of one seed extension.
  typedef struct packed {
    logic [15:0] tag;     // job tag given by the host
    score_t      score;   // best local score (starts at the seed score h0)
    len_t        qle;     // query characters used by the best cell (0: none)
    len_t        tle;     // target characters used by the best cell (0: none)
    score_t      gscore;  // score of the last cell (whole query, whole target)
  } ext_result_t;

  function automatic score_t smax(input score_t a, input score_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
