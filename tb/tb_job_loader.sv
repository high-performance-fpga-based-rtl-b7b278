// Test of the job loader: job words are offered from a model queue that
// behaves like the show-ahead write FIFO; the memory writes are captured
// and compared base by base, the job header fields are checked, and the
// loader must neither take words while the core is busy nor before the
// previous job has been taken.
module tb_job_loader;
  import bwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] fifo_rdata;
  logic fifo_empty, fifo_pop;
  logic q_we, t_we;
  len_t q_addr, t_addr, qlen, tlen;
  base_e q_base, t_base;
  logic core_busy = 0, job_taken = 0, job_ready;
  score_t h0;
  logic [15:0] tag;

  job_loader dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] words[$];
  assign fifo_empty = (words.size() == 0);
  assign fifo_rdata = fifo_empty ? 32'h0 : words[0];
  int qm[256], tm[256];
  int pops_while_busy = 0;

  always @(posedge clk) begin
    if (fifo_pop && !fifo_empty) void'(words.pop_front());
    if (fifo_pop && core_busy) pops_while_busy++;
    if (q_we) qm[q_addr] = int'(q_base);
    if (t_we) tm[t_addr] = int'(t_base);
  end

  task automatic job(input int ql, input int tl, input int hz, input int tg, input bit busy_first);
    int q[], t[];
    logic [31:0] w;
    q = new[ql]; t = new[tl];
    foreach (q[i]) q[i] = $urandom % 4;
    foreach (t[i]) t[i] = $urandom % 4;
    core_busy = busy_first;
    words.push_back({16'(tl), 16'(ql)});
    words.push_back({16'(tg), 16'(hz)});
    for (int i = 0; i < ql; i += 16) begin
      w = '0; for (int k = 0; k < 16 && i + k < ql; k++) w[2*k +: 2] = 2'(q[i+k]); words.push_back(w);
    end
    for (int i = 0; i < tl; i += 16) begin
      w = '0; for (int k = 0; k < 16 && i + k < tl; k++) w[2*k +: 2] = 2'(t[i+k]); words.push_back(w);
    end
    if (busy_first) begin
      repeat (20) @(posedge clk);
      check(!job_ready && words.size() == 2 + (ql + 15) / 16 + (tl + 15) / 16, "nothing taken while core busy");
      @(negedge clk); core_busy = 0;
    end
    while (!job_ready) @(negedge clk);
    check(qlen == len_t'(ql) && tlen == len_t'(tl), "lengths");
    check(h0 == score_t'(hz) && tag == 16'(tg), "seed score and tag");
    foreach (q[i]) check(qm[i] == q[i], $sformatf("query base %0d", i));
    foreach (t[i]) check(tm[i] == t[i], $sformatf("target base %0d", i));
    // a second job waiting in the queue must not be touched before hand-over
    words.push_back(32'hDEAD_BEEF);
    repeat (10) @(posedge clk);
    check(job_ready && words.size() == 1, "held until taken");
    void'(words.pop_back());
    @(negedge clk); job_taken = 1;
    @(negedge clk); job_taken = 0;
    check(!job_ready, "ready cleared by hand-over");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    job(5, 9, 12, 1, 0);
    job(16, 17, 3, 2, 1);
    job(150, 256, 40, 3, 0);
    job(31, 1, 0, 4, 1);
    job(33, 64, 7, 5, 0);
    check(pops_while_busy == 0, "no pops while core busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
