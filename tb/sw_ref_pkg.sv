// Reference model for the testbenches: the affine-gap extension score
// computed the plain way, one cell after another over the whole matrix.
// Edges: H[-1][-1] = h0, H[-1][c] = max(0, h0-open-ext*(c+1)),
// H[j][-1] = max(0, h0-open-ext*(j+1)); E and F start at minus infinity.
// Cells more than bw off the diagonal are forced to H = 0 with no gaps.
// The best cell is searched column by column, row by row, and replaced
// only by a strictly higher score.
package sw_ref_pkg;

  localparam int MAXN = 1024;
  localparam int NEG  = -100000;

  typedef struct {
    int score;
    int qle;
    int tle;
    int gscore;
  } ref_result_t;

  function automatic int edge_sc(int h0, int k, int go, int ge);
    int v;
    v = h0 - go - ge * (k + 1);
    return (v > 0) ? v : 0;
  endfunction

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  // q and t hold 2-bit base codes.
  function automatic ref_result_t sw_extend(input int q[], input int t[], input int h0,
                                            input int ma, input int mm, input int go, input int ge,
                                            input int bw = 100);
    ref_result_t r;
    int qn, tn;
    int hm[][];
    int em[][];
    int fm[][];
    qn = q.size();
    tn = t.size();
    hm = new[tn];
    em = new[tn];
    fm = new[tn];
    foreach (hm[j]) begin
      hm[j] = new[qn];
      em[j] = new[qn];
      fm[j] = new[qn];
    end
    for (int j = 0; j < tn; j++) begin
      for (int c = 0; c < qn; c++) begin
        int hup, eup, hleft, fleft, hdiag, s;
        hup   = (j == 0) ? edge_sc(h0, c, go, ge) : hm[j-1][c];
        eup   = (j == 0) ? NEG : em[j-1][c];
        hleft = (c == 0) ? edge_sc(h0, j, go, ge) : hm[j][c-1];
        fleft = (c == 0) ? NEG : fm[j][c-1];
        if (j == 0 && c == 0)  hdiag = h0;
        else if (j == 0)       hdiag = edge_sc(h0, c - 1, go, ge);
        else if (c == 0)       hdiag = edge_sc(h0, j - 1, go, ge);
        else                   hdiag = hm[j-1][c-1];
        s = (q[c] == t[j]) ? ma : -mm;
        em[j][c] = imax(hup - go - ge, eup - ge);
        fm[j][c] = imax(hleft - go - ge, fleft - ge);
        hm[j][c] = imax(imax(0, hdiag + s), imax(em[j][c], fm[j][c]));
        if (j - c > bw || c - j > bw) begin
          hm[j][c] = 0; em[j][c] = NEG; fm[j][c] = NEG;
        end
      end
    end
    r.score = h0; r.qle = 0; r.tle = 0;
    r.gscore = (qn > 0 && tn > 0) ? hm[tn-1][qn-1] : h0;
    for (int c = 0; c < qn; c++)
      for (int j = 0; j < tn; j++)
        if (hm[j][c] > r.score) begin
          r.score = hm[j][c]; r.qle = c + 1; r.tle = j + 1;
        end
    return r;
  endfunction

endpackage
