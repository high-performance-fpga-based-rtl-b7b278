// Test of the communication handler alone: register reads (ID, status,
// result with the valid flag), writes into the write queue and the
// overflow flag, the start request waiting for a loaded job and an idle
// core, the event flag and interrupt raised by a written result and
// cleared by the host, and silence towards another device's page.
module tb_comm_handler;
  localparam logic [7:0] DEV = 8'd5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bus_sel = 0, bus_we = 0, bus_re = 0;
  logic [15:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid, irq;
  logic wf_push, wf_full = 0, rf_pop, rf_empty = 1;
  logic [31:0] wf_wdata, rf_rdata = 0;
  logic [6:0] rf_count = 0, wf_count = 0;
  logic job_ready = 0, core_busy = 0, writer_busy = 0, result_written = 0, core_start;

  comm_handler #(.DEVICE_ID(DEV), .N_PU(30), .CNT_W(7)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_push = 0, n_pop = 0, n_start = 0;
  logic [31:0] last_push;
  always @(posedge clk) begin
    if (wf_push) begin n_push++; last_push = wf_wdata; end
    if (rf_pop) n_pop++;
    if (core_start) n_start++;
  end

  task automatic wr(input logic [7:0] dev, input logic [7:0] off, input logic [31:0] d);
    @(negedge clk); bus_sel = 1; bus_we = 1; bus_addr = {dev, off}; bus_wdata = d;
    @(negedge clk); bus_sel = 0; bus_we = 0;
  endtask
  task automatic rd(input logic [7:0] dev, input logic [7:0] off, output logic [31:0] d, output logic v);
    @(negedge clk); bus_sel = 1; bus_re = 1; bus_addr = {dev, off};
    @(negedge clk); bus_sel = 0; bus_re = 0;
    d = bus_rdata; v = bus_rvalid;
  endtask

  initial begin
    logic [31:0] d;
    logic v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(DEV, 8'h00, d, v);
    check(v && d == {16'd30, 8'h00, DEV}, "ID");
    rd(8'd6, 8'h00, d, v);
    check(!v, "other device silent");
    wr(8'd6, 8'h0C, 32'h1234);
    check(n_push == 0, "other device write ignored");
    wr(DEV, 8'h0C, 32'hCAFE_0001);
    check(n_push == 1 && last_push == 32'hCAFE_0001, "data pushed");
    wf_full = 1;
    wr(DEV, 8'h0C, 32'h2);
    check(n_push == 1, "no push when full");
    rd(DEV, 8'h08, d, v);
    check(d[5] && d[6], "full and overflow flags");
    wf_full = 0;
    // start waits for a loaded job
    wr(DEV, 8'h04, 32'h1);
    rd(DEV, 8'h08, d, v);
    check(d[4] && n_start == 0, "start pending");
    core_busy = 1; job_ready = 1;
    repeat (5) @(negedge clk);
    check(n_start == 0, "start held while core busy");
    core_busy = 0;
    @(negedge clk);
    check(n_start == 1, "start issued");
    job_ready = 0;
    rd(DEV, 8'h08, d, v);
    check(!d[4], "pending cleared");
    // result and event
    rd(DEV, 8'h10, d, v);
    check(v && d == 0 && n_pop == 0, "empty result read gives 0, no pop");
    @(negedge clk); result_written = 1; rf_empty = 0; rf_count = 3; rf_rdata = 32'h00AB_0042;
    @(negedge clk); result_written = 0;
    check(irq, "interrupt raised");
    rd(DEV, 8'h08, d, v);
    check(d[0] && d[3] && d[23:16] == 3, "valid flag, event, count");
    rd(DEV, 8'h10, d, v);
    check(d == 32'h00AB_0042 && n_pop == 1, "result popped");
    wr(DEV, 8'h04, 32'h2);
    check(!irq, "event cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
