// Two accelerators on one bus (N_CORES = 2, device numbers 3 and 4),
// each with a 4-PU chain. The host loads a different job into each,
// starts both so they run at the same time, and waits for each core's
// own interrupt line. It checks the ID registers, that each result comes
// from the core it was sent to, that the two cores overlapped in time,
// and that an unused device number gets no answer.
module tb_multi_core;
  import bwa_pkg::*;
  import sw_ref_pkg::*;

  localparam int N_PU = 4, MAXL = 64;
  localparam int MA = 1, MM = 4, GO = 6, GE = 1;
  localparam logic [7:0] DEV0 = 8'd3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bus_sel = 0, bus_we = 0, bus_re = 0;
  logic [15:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0;
  logic [31:0] bus_rdata;
  logic        bus_rvalid;
  logic [1:0]  irq;

  bwa_accel_top #(.N_CORES(2), .N_PU(N_PU), .MAX_QLEN(MAXL), .MAX_TLEN(MAXL),
                  .FIFO_DEPTH(16), .DEVICE_ID(DEV0)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int both_busy = 0;
  always @(posedge clk)
    if (dut.g_core[0].core_busy && dut.g_core[1].core_busy) both_busy++;

  task automatic bus_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_sel = 0; bus_we = 0;
  endtask
  task automatic bus_read(input logic [15:0] a, output logic [31:0] d, output logic v);
    @(negedge clk); bus_sel = 1; bus_re = 1; bus_addr = a;
    @(negedge clk); bus_sel = 0; bus_re = 0;
    d = bus_rdata; v = bus_rvalid;
  endtask

  task automatic send_job(input logic [7:0] dev, input int q[], input int t[], input int hz, input int tg);
    logic [31:0] w;
    logic [31:0] st;
    logic v;
    w = {16'(t.size()), 16'(q.size())};
    bus_write({dev, 8'h0C}, w);
    bus_write({dev, 8'h0C}, {16'(tg), 16'(hz)});
    for (int i = 0; i < q.size(); i += 16) begin
      w = '0; for (int k = 0; k < 16 && i + k < q.size(); k++) w[2*k +: 2] = 2'(q[i+k]);
      bus_write({dev, 8'h0C}, w);
    end
    for (int i = 0; i < t.size(); i += 16) begin
      w = '0; for (int k = 0; k < 16 && i + k < t.size(); k++) w[2*k +: 2] = 2'(t[i+k]);
      bus_write({dev, 8'h0C}, w);
    end
    bus_read({dev, 8'h08}, st, v);
    check(v && !st[6], "no overflow");
    bus_write({dev, 8'h04}, 32'h1);
  endtask

  task automatic get_result(input int k, input ref_result_t r, input int tg);
    logic [31:0] w0, w1, w2, st;
    logic v;
    logic [7:0] dev;
    dev = DEV0 + 8'(k);
    while (!irq[k]) @(negedge clk);
    bus_write({dev, 8'h04}, 32'h2);
    bus_read({dev, 8'h08}, st, v);
    check(v && st[0] && st[23:16] == 3, $sformatf("core %0d valid flag and 3 words", k));
    bus_read({dev, 8'h10}, w0, v);
    bus_read({dev, 8'h10}, w1, v);
    bus_read({dev, 8'h10}, w2, v);
    check(int'(w0[31:16]) == tg, $sformatf("core %0d tag %0d exp %0d", k, w0[31:16], tg));
    check(score_t'(w0[15:0]) == score_t'(r.score), $sformatf("core %0d score", k));
    check(int'(w1[15:0]) == r.qle && int'(w1[31:16]) == r.tle, $sformatf("core %0d qle/tle", k));
    check(score_t'(w2[15:0]) == score_t'(r.gscore), $sformatf("core %0d gscore", k));
  endtask

  initial begin
    int q0[], t0[], q1[], t1[];
    ref_result_t r0, r1;
    logic [31:0] d;
    logic v;
    repeat (4) @(posedge clk);
    rst_n = 1;
    bus_read({DEV0, 8'h00}, d, v);
    check(v && d[7:0] == DEV0, "ID of core 0");
    bus_read({DEV0 + 8'd1, 8'h00}, d, v);
    check(v && d[7:0] == DEV0 + 8'd1, "ID of core 1");
    bus_read({DEV0 + 8'd2, 8'h00}, d, v);
    check(!v, "unused device number silent");
    for (int n = 0; n < 4; n++) begin
      q0 = new[20 + n * 9]; t0 = new[40 + n * 5];
      q1 = new[33 - n * 4]; t1 = new[50 - n * 7];
      foreach (t0[i]) t0[i] = $urandom % 4;
      foreach (q0[i]) q0[i] = (i < t0.size() && $urandom % 10 != 0) ? t0[i] : int'($urandom % 4);
      foreach (t1[i]) t1[i] = $urandom % 4;
      foreach (q1[i]) q1[i] = (i < t1.size() && $urandom % 10 != 0) ? t1[i] : int'($urandom % 4);
      r0 = sw_extend(q0, t0, 12, MA, MM, GO, GE);
      r1 = sw_extend(q1, t1, 9, MA, MM, GO, GE);
      send_job(DEV0, q0, t0, 12, 10 + n);
      send_job(DEV0 + 8'd1, q1, t1, 9, 20 + n);
      get_result(0, r0, 10 + n);
      get_result(1, r1, 20 + n);
    end
    check(both_busy > 0, "cores ran at the same time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
