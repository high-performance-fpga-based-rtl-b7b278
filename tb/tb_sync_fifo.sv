// Random push/pop test of the queue against a SystemVerilog queue model:
// data order, full/empty flags, the word count, and pushes/pops that the
// flags forbid (issued only when allowed, as the assertions require).
module tb_sync_fifo;
  localparam int W = 32, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic full, empty;
  logic [$clog2(D):0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] model[$];
  int n_full = 0, n_empty = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      check(count == ($clog2(D)+1)'(model.size()), "count");
      check(full == (model.size() == D), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (!empty) check(rdata == model[0], "head word");
      if (full) n_full++;
      if (empty) n_empty++;
      // phases biased towards filling, then towards draining
      push = !full && ($urandom % 100 < ((k / 300) % 2 ? 30 : 70));
      pop  = !empty && ($urandom % 100 < ((k / 300) % 2 ? 70 : 30));
      wdata = $urandom;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    check(n_full > 0 && n_empty > 0, "both full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
