// Read-length classes run through the seed-extension core at its default
// size (30 PUs, 256-base memories): short reads (10-50 bases), medium
// reads (50-120) and long reads (121-256). Each extension pairs a read
// with a related target window somewhat longer than the read. Results are
// compared with the cell-by-cell reference and every job's cycle count
// with the core's formula; the average cycles per extension of each class
// are printed, with the time they take at a 200 MHz clock.
module tb_read_workloads;
  import bwa_pkg::*;
  import sw_ref_pkg::*;

  localparam int N_PU = 30, P = 2;
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

  seed_ext_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_job(input int q[], input int t[], input int hz, input int id, output int cyc);
    ref_result_t r;
    int chunks;
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
    r = sw_extend(q, t, hz, MA, MM, GO, GE);
    chunks = (q.size() + N_PU - 1) / N_PU;
    check(result.score == score_t'(r.score) && result.qle == len_t'(r.qle) &&
          result.tle == len_t'(r.tle) && result.gscore == score_t'(r.gscore),
          $sformatf("job %0d result %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d", id, result.score,
                    result.qle, result.tle, result.gscore, r.score, r.qle, r.tle, r.gscore));
    check(cyc == 1 + chunks * (P * (t.size() - 1) + N_PU + 5), $sformatf("job %0d cycles", id));
  endtask

  initial begin
    int q[], t[];
    int lo[3] = '{10, 50, 121};
    int hi[3] = '{50, 120, 256};
    string nm[3] = '{"short", "medium", "long"};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3; c++) begin
      longint total = 0;
      int cyc;
      for (int n = 0; n < 6; n++) begin
        int ql, tl;
        ql = lo[c] + int'($urandom % (hi[c] - lo[c] + 1));
        tl = ql + int'($urandom % (ql / 4 + 1));
        if (tl > 256) tl = 256;
        q = new[ql]; t = new[tl];
        foreach (t[i]) t[i] = $urandom % 4;
        foreach (q[i]) q[i] = ($urandom % 15 == 0) ? int'($urandom % 4) : t[i];
        run_job(q, t, 19, c * 100 + n, cyc);
        total += cyc;
      end
      $display("%s reads: %0d cycles per extension on average, %0d ns at 200 MHz",
               nm[c], total / 6, (total / 6) * 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
