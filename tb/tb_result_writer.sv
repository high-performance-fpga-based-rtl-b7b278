// Test of the result writer: random results are handed over and the
// words pushed into a model queue are compared with the expected layout,
// while the queue randomly reports full (pushes must stop, nothing may be
// lost or repeated). `written` must pulse once per result, after its
// third word.
module tb_result_writer;
  import bwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic core_done = 0, fifo_full = 0, fifo_push, busy, written;
  ext_result_t result = '0;
  logic [31:0] fifo_wdata;

  result_writer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] got[$];
  int n_written = 0, n_stalled = 0;
  always @(posedge clk) begin
    if (fifo_push) begin
      if (fifo_full) begin failures++; $display("FAIL: push while full"); end
      got.push_back(fifo_wdata);
    end
    if (written) n_written++;
    if (busy && fifo_full) n_stalled++;
  end
  always @(negedge clk) fifo_full = ($urandom % 3 == 0);

  initial begin
    ext_result_t r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      r.tag = 16'($urandom); r.score = score_t'($urandom % 200);
      r.qle = len_t'($urandom % 256); r.tle = len_t'($urandom % 256);
      r.gscore = score_t'(int'($urandom % 100) - 20);
      got.delete();
      @(negedge clk); core_done = 1; result = r;
      @(negedge clk); core_done = 0; result = '0;
      while (busy) @(negedge clk);
      @(negedge clk);
      check(got.size() == 3, $sformatf("three words, got %0d", got.size()));
      if (got.size() == 3) begin
        check(got[0] == {r.tag, r.score}, "word 0");
        check(got[1] == {r.tle, r.qle}, "word 1");
        check(got[2] == {16'h0, r.gscore}, "word 2");
      end
      check(n_written == n + 1, "written pulse");
    end
    check(n_stalled > 0, "stalled on full queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
