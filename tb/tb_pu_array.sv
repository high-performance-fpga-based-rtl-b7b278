// Test of the PU chain with 5 PUs and one query chunk. The testbench
// plays the core: it loads the PUs, issues target rows every ROW_PERIOD
// cycles and drives the boundary column with the core's timing. It checks
// that PU[i] finishes row j exactly j*P + i + 3 cycles after row 0 starts
// (the diagonal wavefront), every PU's H for every row, and each column's
// best against a full matrix computed here.
module tb_pu_array;
  import bwa_pkg::*;

  localparam int N = 5, P = 2;
  localparam int MA = 1, MM = 4, GO = 6, GE = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   load = 0, in_start = 0;
  base_e  load_qchar [N];
  score_t load_h_init[N];
  logic   load_active[N];
  len_t   load_col[N];
  base_e  in_tchar = BASE_A;
  score_t bnd_h = 0, bnd_f = NEG_INF;
  score_t h[N], f[N], best[N];
  logic   row_done[N];
  len_t   best_row[N];

  pu_array #(.N_PU(N), .MATCH(MA), .MISMATCH(MM), .GAP_OPEN(GO), .GAP_EXT(GE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int imax(int a, int b); return a > b ? a : b; endfunction

  task automatic run(input int rows, input int nact, input int h0);
    int q[N], t[], top[N], lb[], hm[][], em[][], fm[][], bst[N], brow[N];
    t = new[rows]; lb = new[rows]; hm = new[rows]; em = new[rows]; fm = new[rows];
    foreach (q[i]) q[i] = $urandom % 4;
    foreach (t[j]) begin
      t[j] = (j < N && $urandom % 3 != 0) ? q[j] : int'($urandom % 4);
      lb[j] = imax(0, h0 - GO - GE * (j + 1));
      hm[j] = new[N]; em[j] = new[N]; fm[j] = new[N];
    end
    foreach (top[i]) top[i] = imax(0, h0 - GO - GE * (i + 1));
    for (int j = 0; j < rows; j++)
      for (int i = 0; i < N; i++) begin
        int hu, eu, hl, fl, hd;
        hu = (j == 0) ? top[i] : hm[j-1][i];
        eu = (j == 0) ? NEG_INF : em[j-1][i];
        hl = (i == 0) ? lb[j] : hm[j][i-1];
        fl = (i == 0) ? NEG_INF : fm[j][i-1];
        hd = (j == 0) ? ((i == 0) ? h0 : top[i-1]) : ((i == 0) ? lb[j-1] : hm[j-1][i-1]);
        em[j][i] = imax(hu - GO - GE, eu - GE);
        fm[j][i] = imax(hl - GO - GE, fl - GE);
        hm[j][i] = imax(imax(0, hd + ((q[i] == t[j]) ? MA : -MM)), imax(em[j][i], fm[j][i]));
      end
    foreach (bst[i]) begin
      bst[i] = NEG_INF; brow[i] = 0;
      for (int j = 0; j < rows; j++) if (hm[j][i] > bst[i]) begin bst[i] = hm[j][i]; brow[i] = j + 1; end
    end
    @(negedge clk);
    load = 1;
    foreach (q[i]) begin
      load_qchar[i] = base_e'(q[i]); load_h_init[i] = score_t'(top[i]); load_active[i] = (i < nact); load_col[i] = len_t'(i);
    end
    bnd_h = score_t'(h0); bnd_f = NEG_INF;
    @(negedge clk); load = 0;
    for (int k = 0; k < rows * P + N + 4; k++) begin
      for (int i = 0; i < N; i++) begin
        bit due;
        int j;
        due = (k >= i + 3) && ((k - i - 3) % P == 0) && ((k - i - 3) / P < rows);
        j = (k - i - 3) / P;
        check(row_done[i] == due, $sformatf("PU %0d row_done timing at %0d", i, k));
        if (due) check(h[i] == score_t'(hm[j][i]), $sformatf("PU %0d row %0d H %0d exp %0d", i, j, h[i], hm[j][i]));
      end
      in_start = (k % P == 0) && (k / P < rows);
      if (in_start) in_tchar = base_e'(t[k / P]);
      if (k >= 2 && (k - 2) % P == 0 && (k - 2) / P < rows) begin
        bnd_h = score_t'(lb[(k-2)/P]);
        bnd_f = NEG_INF;
      end
      @(negedge clk);
    end
    for (int i = 0; i < N; i++)
      if (i < nact) check(best[i] == score_t'(bst[i]) && best_row[i] == len_t'(brow[i]),
                          $sformatf("PU %0d best %0d@%0d exp %0d@%0d", i, best[i], best_row[i], bst[i], brow[i]));
      else check(best[i] == NEG_INF, "inactive PU keeps no best");
  endtask

  initial begin
    foreach (load_qchar[i]) begin load_qchar[i] = BASE_A; load_h_init[i] = 0; load_active[i] = 0; load_col[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) run(3 + 2 * n, (n % 3 == 0) ? 3 : N, 5 + n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
