// End-to-end test of the accelerator at its default size (30 PUs,
// 256-base memories, 64-word queues), driven the way a host would drive
// it over the register bus.
//
// Phase 1 is event driven: the host queues jobs while the core is busy,
// requests starts, and reads results when the interrupt rises. Jobs
// include a 150-base read against a 256-base target, queries shorter and
// longer than the PU chain, and whole-memory 256x256 jobs. Phase 2 queues
// many small jobs without reading results, so the read queue fills and
// the result writer stalls, then drains everything. Each result is
// compared with the cell-by-cell reference; the core's start-to-done time
// is checked against its cycle formula. The mechanisms the design has
// (chunked restart from stored boundary scores, partly used PU chain,
// start request waiting for the loader, queueing during a run, full write
// queue, full read queue, interrupt, foreign device page) are counted and
// each must occur.
module tb_bwa_accel_top;
  import bwa_pkg::*;
  import sw_ref_pkg::*;

  localparam int N_PU = 30, MAXL = 256, P = 2;
  localparam int MA = 1, MM = 4, GO = 6, GE = 1;
  localparam logic [7:0] DEV = 8'd1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bus_sel = 0, bus_we = 0, bus_re = 0;
  logic [15:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0;
  logic [31:0] bus_rdata;
  logic        bus_rvalid, irq;

  bwa_accel_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected results by tag
  ref_result_t exp_res [int];
  int          exp_cyc [int];
  int          received = 0;

  // mechanism counters
  int n_multi_chunk = 0, n_partial_chain = 0, n_start_wait = 0, n_queued_in_run = 0;
  int n_wfifo_full = 0, n_rfifo_stall = 0, n_irq = 0, n_foreign = 0;

  always @(posedge clk) begin
    if (dut.g_core[0].u_handler.start_pending && !dut.g_core[0].job_ready) n_start_wait++;
    if (dut.g_core[0].wf_push && dut.g_core[0].core_busy) n_queued_in_run++;
    if (dut.g_core[0].wf_full) n_wfifo_full++;
    if (dut.g_core[0].writer_busy && dut.g_core[0].rf_full) n_rfifo_stall++;
    if (dut.g_core[0].u_core.state == 3'd1 && !dut.g_core[0].u_core.first_chunk && dut.g_core[0].u_core.bnd_h != 0) n_multi_chunk++;
  end
  logic irq_q = 0;
  always @(posedge clk) begin irq_q <= irq; if (irq && !irq_q) n_irq++; end

  // core timing
  int cyc_count = 0, measured_tag = -1;
  // sampled on the falling edge: the count is the latency plus one
  always @(negedge clk) begin
    if (dut.g_core[0].core_start) begin cyc_count = 0; measured_tag = int'(dut.g_core[0].tag); end
    else cyc_count++;
    if (dut.g_core[0].core_done)
      check(cyc_count == exp_cyc[measured_tag] + 1,
            $sformatf("tag %0d core cycles %0d exp %0d", measured_tag, cyc_count, exp_cyc[measured_tag]));
  end

  task automatic bus_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_sel = 0; bus_we = 0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_re = 1; bus_addr = a;
    @(negedge clk); bus_sel = 0; bus_re = 0;
    if (!bus_rvalid) begin failures++; $display("FAIL: read not answered"); end
    d = bus_rdata;
  endtask

  function automatic logic [15:0] reg_a(input logic [7:0] off);
    return {DEV, off};
  endfunction

  bit service_on = 1;

  // Read every complete result waiting in the read queue.
  task automatic drain_results();
    logic [31:0] st, w0, w1, w2;
    int tg;
    bus_read(reg_a(8'h08), st);
    while (st[0] && st[23:16] >= 3) begin
      bus_read(reg_a(8'h10), w0);
      bus_read(reg_a(8'h10), w1);
      bus_read(reg_a(8'h10), w2);
      tg = int'(w0[31:16]);
      if (!exp_res.exists(tg)) begin
        check(0, $sformatf("unexpected tag %0d", tg));
      end else begin
        check(score_t'(w0[15:0]) == score_t'(exp_res[tg].score),
              $sformatf("tag %0d score %0d exp %0d", tg, $signed(w0[15:0]), exp_res[tg].score));
        check(int'(w1[15:0]) == exp_res[tg].qle && int'(w1[31:16]) == exp_res[tg].tle,
              $sformatf("tag %0d qle/tle %0d/%0d exp %0d/%0d", tg, w1[15:0], w1[31:16],
                        exp_res[tg].qle, exp_res[tg].tle));
        check(score_t'(w2[15:0]) == score_t'(exp_res[tg].gscore),
              $sformatf("tag %0d gscore %0d exp %0d", tg, $signed(w2[15:0]), exp_res[tg].gscore));
        exp_res.delete(tg);
        received++;
      end
      bus_read(reg_a(8'h08), st);
    end
  endtask

  // Event handler: clear the event first, then take the results.
  task automatic service();
    if (service_on && irq) begin
      bus_write(reg_a(8'h04), 32'h2);
      drain_results();
    end
  endtask

  task automatic push_word(input logic [31:0] w);
    logic [31:0] st;
    forever begin
      bus_read(reg_a(8'h08), st);
      if (!st[5]) break;
      service();
    end
    bus_write(reg_a(8'h0C), w);
  endtask

  task automatic push_job(input int q[], input int t[], input int hz, input int tg);
    logic [31:0] w;
    int chunks;
    exp_res[tg] = sw_extend(q, t, hz, MA, MM, GO, GE);
    chunks = (q.size() + N_PU - 1) / N_PU;
    exp_cyc[tg] = 1 + chunks * (P * (t.size() - 1) + N_PU + 5);
    if (q.size() % N_PU != 0) n_partial_chain++;
    push_word({16'(t.size()), 16'(q.size())});
    push_word({16'(tg), 16'(hz)});
    for (int i = 0; i < q.size(); i += 16) begin
      w = '0;
      for (int k = 0; k < 16 && i + k < q.size(); k++) w[2*k +: 2] = 2'(q[i+k]);
      push_word(w);
    end
    for (int i = 0; i < t.size(); i += 16) begin
      w = '0;
      for (int k = 0; k < 16 && i + k < t.size(); k++) w[2*k +: 2] = 2'(t[i+k]);
      push_word(w);
    end
  endtask

  task automatic request_start();
    logic [31:0] st;
    forever begin
      bus_read(reg_a(8'h08), st);
      if (!st[4]) break;
      service();
    end
    bus_write(reg_a(8'h04), 32'h1);
  endtask

  // random target, and a query that is either related to it or random
  task automatic make_pair(input int ql, input int tl, input bit related, output int q[], output int t[]);
    t = new[tl];
    foreach (t[i]) t[i] = $urandom % 4;
    q = new[ql];
    foreach (q[i]) begin
      if (related && i < tl && ($urandom % 12) != 0) q[i] = t[i];
      else q[i] = $urandom % 4;
    end
  endtask

  initial begin
    int q[], t[];
    logic [31:0] d;
    int sizes[6][2] = '{'{150, 256}, '{256, 256}, '{256, 256}, '{20, 40}, '{30, 60}, '{75, 150}};
    repeat (4) @(posedge clk);
    rst_n = 1;

    // device identification, and a foreign page that must stay silent
    bus_read(reg_a(8'h00), d);
    check(d[7:0] == DEV && d[31:16] == 16'(N_PU), "ID register");
    @(negedge clk); bus_sel = 1; bus_re = 1; bus_addr = {8'd7, 8'h00};
    @(negedge clk); bus_sel = 0; bus_re = 0;
    if (!bus_rvalid) n_foreign++;
    check(!bus_rvalid, "foreign device page ignored");

    // phase 1: event driven, next jobs queued while the core runs
    // (jobs 1 and 2 are queued back to back behind a running job 0, which
    // overfills the write queue until job 0 ends and job 1 is loaded)
    for (int n = 0; n < 6; n++) begin
      make_pair(sizes[n][0], sizes[n][1], n != 3, q, t);
      push_job(q, t, 10 + n, 100 + n);
      if (n != 1) request_start();
      if (n == 2) request_start();
      service();
    end
    repeat (40) begin
      repeat (500) @(posedge clk);
      service();
    end
    check(received == 6, $sformatf("phase 1 results %0d of 6", received));

    // phase 2: results left unread until the read queue is full
    service_on = 0;
    for (int n = 0; n < 22; n++) begin
      make_pair(3 + n % 6, 4 + n % 5, n % 2 == 0, q, t);
      push_job(q, t, n % 7, 200 + n);
      request_start();
    end
    repeat (300) @(posedge clk);
    service_on = 1;
    while (received < 28) begin
      bus_write(reg_a(8'h04), 32'h2);
      drain_results();
      repeat (50) @(posedge clk);
    end
    check(exp_res.num() == 0, "every job answered");
    bus_read(reg_a(8'h08), d);
    check(!d[6], "no write overflow");

    check(n_multi_chunk > 0, "chunked restart from nonzero boundary");
    check(n_partial_chain > 0, "partly used PU chain");
    check(n_start_wait > 0, "start request waited for the loader");
    check(n_queued_in_run > 0, "jobs queued while the core runs");
    check(n_wfifo_full > 0, "write queue full");
    check(n_rfifo_stall > 0, "read queue full stalls the writer");
    check(n_irq > 0, "event raised");
    check(n_foreign > 0, "foreign page access");
    $display("mechanisms: multi_chunk=%0d partial_chain=%0d start_wait=%0d queued_in_run=%0d wfifo_full=%0d rfifo_stall=%0d irq=%0d foreign=%0d",
             n_multi_chunk, n_partial_chain, n_start_wait, n_queued_in_run, n_wfifo_full,
             n_rfifo_stall, n_irq, n_foreign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (received %0d)", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
