// Test of one processing unit against a hand-driven left neighbour.
// Rows are issued every 2 cycles (writeback overlapping the next row's
// preparing, which needs the forwarded H/E) and then every 3 cycles. The
// neighbour's H holds the diagonal cell while the PU scores and the left
// cell while it writes back. Every row's H and F, the row_done timing
// (3 cycles after the row starts) and the column best are compared with a
// recurrence computed here.
module tb_pu;
  import bwa_pkg::*;

  localparam int MA = 1, MM = 4, GO = 6, GE = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load = 0, load_active = 1, in_start = 0;
  base_e load_qchar = BASE_A, in_tchar = BASE_A;
  score_t load_h_init = 0, left_h = 0, left_f = NEG_INF;
  len_t load_col = 0;
  logic out_start, row_done;
  base_e out_tchar;
  score_t h, f, best;
  len_t best_row;

  pu #(.MATCH(MA), .MISMATCH(MM), .GAP_OPEN(GO), .GAP_EXT(GE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int imax(int a, int b); return a > b ? a : b; endfunction

  task automatic run_column(input int period, input int rows, input int qc, input int hinit);
    int tch[], lh[], lf[], eh[], ef[];
    int hprev, eprev, diag, e, fv, hv, bst, brow;
    tch = new[rows]; lh = new[rows]; lf = new[rows]; eh = new[rows]; ef = new[rows];
    foreach (tch[j]) begin
      tch[j] = $urandom % 4;
      lh[j]  = $urandom % 25;
      lf[j]  = int'($urandom % 25) - 8;
    end
    // expected column
    hprev = hinit; eprev = NEG_INF; diag = 7; bst = NEG_INF; brow = 0;
    for (int j = 0; j < rows; j++) begin
      e  = imax(hprev - GO - GE, eprev - GE);
      fv = imax(lh[j] - GO - GE, lf[j] - GE);
      hv = imax(imax(0, diag + ((tch[j] == qc) ? MA : -MM)), imax(e, fv));
      eh[j] = hv; ef[j] = fv;
      if (hv > bst) begin bst = hv; brow = j + 1; end
      hprev = hv; eprev = e; diag = lh[j];
    end
    @(negedge clk);
    load = 1; load_qchar = base_e'(qc); load_h_init = score_t'(hinit); load_active = 1;
    left_h = 7; left_f = NEG_INF;
    @(negedge clk); load = 0;
    for (int k = 0; k < rows * period + 4; k++) begin
      // state after the previous rising edge
      for (int j = 0; j < rows; j++)
        if (j * period + 3 == k) begin
          check(row_done, $sformatf("row %0d done on time", j));
          check(h == score_t'(eh[j]), $sformatf("row %0d H %0d exp %0d", j, h, eh[j]));
          check(f == score_t'(ef[j]), $sformatf("row %0d F %0d exp %0d", j, f, ef[j]));
        end
      if (k >= 1 && (k - 1) % period == 0 && (k - 1) / period < rows)
        check(out_start && out_tchar == base_e'(tch[(k-1)/period]), "start passed on");
      in_start = (k % period == 0) && (k / period < rows);
      if (in_start) in_tchar = base_e'(tch[k / period]);
      if (k >= 2 && (k - 2) % period == 0 && (k - 2) / period < rows) begin
        left_h = score_t'(lh[(k-2)/period]);
        left_f = score_t'(lf[(k-2)/period]);
      end
      @(negedge clk);
    end
    in_start = 0;
    check(best == score_t'(bst) && best_row == len_t'(brow),
          $sformatf("best %0d@%0d exp %0d@%0d", best, best_row, bst, brow));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) run_column(2 + (n % 2), 5 + n, n % 4, n * 2);
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
