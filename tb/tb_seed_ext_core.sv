// Self-checking test of the seed-extension core with a small PU array
// (4 PUs) and a narrow band (8), so that most jobs need several query
// chunks and reach past the band. Random and related query/target pairs
// are loaded, scored, and compared with the cell-by-cell reference; the start-to-done cycle count is checked
// against 1 + chunks*(ROW_PERIOD*(|T|-1) + N_PU + 5).
module tb_seed_ext_core;
  import bwa_pkg::*;
  import sw_ref_pkg::*;

  localparam int N_PU = 4, MAXL = 64, P = 2, BW = 8;
  localparam int MA = 1, MM = 4, GO = 6, GE = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic q_we = 0, t_we = 0, start = 0;
  len_t q_addr = 0, t_addr = 0, qlen = 0, tlen = 0;
  base_e q_base = BASE_A, t_base = BASE_A;
  score_t h0 = 0;
  logic [15:0] tag = 0;
  logic busy, done;
  ext_result_t result;

  seed_ext_core #(.N_PU(N_PU), .MAX_QLEN(MAXL), .MAX_TLEN(MAXL), .ROW_PERIOD(P), .BAND_W(BW)) dut (.*);

  int checks = 0, failures = 0;
  int multi_chunk = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_job(input int q[], input int t[], input int hz, input int id);
    ref_result_t r;
    int cyc, chunks, exp_cyc;
    for (int i = 0; i < q.size(); i++) begin
      @(negedge clk); q_we = 1; q_addr = len_t'(i); q_base = base_e'(q[i]);
    end
    for (int i = 0; i < t.size(); i++) begin
      @(negedge clk); q_we = 0; t_we = 1; t_addr = len_t'(i); t_base = base_e'(t[i]);
    end
    @(negedge clk); q_we = 0; t_we = 0;
    qlen = len_t'(q.size()); tlen = len_t'(t.size()); h0 = score_t'(hz); tag = 16'(id);
    start = 1;
    @(posedge clk);
    cyc = 0;
    @(negedge clk); start = 0;
    while (!done) begin @(posedge clk); cyc++; #1; end
    r = sw_extend(q, t, hz, MA, MM, GO, GE, BW);
    chunks = (q.size() + N_PU - 1) / N_PU;
    if (chunks > 1) multi_chunk++;
    exp_cyc = (q.size() == 0 || t.size() == 0) ? 1 : 1 + chunks * (P * (t.size() - 1) + N_PU + 5);
    check(result.score == score_t'(r.score), $sformatf("job %0d score %0d exp %0d", id, result.score, r.score));
    check(result.qle == len_t'(r.qle), $sformatf("job %0d qle %0d exp %0d", id, result.qle, r.qle));
    check(result.tle == len_t'(r.tle), $sformatf("job %0d tle %0d exp %0d", id, result.tle, r.tle));
    check(result.gscore == score_t'(r.gscore), $sformatf("job %0d gscore %0d exp %0d", id, result.gscore, r.gscore));
    check(result.tag == 16'(id), $sformatf("job %0d tag", id));
    check(cyc == exp_cyc, $sformatf("job %0d cycles %0d exp %0d", id, cyc, exp_cyc));
  endtask

  initial begin
    int q[], t[];
    int ql, tl, k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // hand-made: identical strings, seed score 10
    q = '{0, 1, 2, 3, 0, 1};
    t = '{0, 1, 2, 3, 0, 1};
    run_job(q, t, 10, 1);
    check(result.score == 16 && result.qle == 6 && result.tle == 6, "identical strings extend fully");
    for (int n = 0; n < 40; n++) begin
      tl = 1 + ($urandom % MAXL);
      t = new[tl];
      foreach (t[i]) t[i] = $urandom % 4;
      if (n % 2 == 0) begin
        // related query: the target with substitutions and indels
        int tmp[$];
        foreach (t[i]) begin
          k = $urandom % 20;
          if (k == 0) continue;                       // deletion
          tmp.push_back((k == 1) ? int'($urandom % 4) : t[i]);
          if (k == 2) tmp.push_back($urandom % 4);    // insertion
        end
        if (tmp.size() == 0) tmp.push_back(0);
        while (tmp.size() > MAXL) void'(tmp.pop_back());
        q = new[tmp.size()];
        foreach (q[i]) q[i] = tmp[i];
      end else begin
        ql = 1 + ($urandom % MAXL);
        q = new[ql];
        foreach (q[i]) q[i] = $urandom % 4;
      end
      run_job(q, t, $urandom % 30, n + 2);
    end
    check(multi_chunk > 10, "multi-chunk jobs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
