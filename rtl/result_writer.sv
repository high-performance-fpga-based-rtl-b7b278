// Result writer: turns a finished extension into three words of the
// host's read queue and signals when they are all queued.
//   word 0: job tag [31:16], best score [15:0]
//   word 1: target bases used [31:16], query bases used [15:0]
//   word 2: score of the last cell (whole query against whole target) [15:0]
// The result is captured on `core_done`; a word is pushed whenever the
// queue has room, so a full queue stalls the writer, never the data.
// `written` pulses after the third word. The word layout is this design's
// choice; the description only says results go back to the host through
// a queue.
module result_writer
  import bwa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        core_done,
  input  ext_result_t result,
  input  logic        fifo_full,
  output logic        fifo_push,
  output logic [31:0] fifo_wdata,
  output logic        busy,
  output logic        written
);

  ext_result_t held;
  logic [1:0]  word_idx;

  assign busy      = (word_idx != 2'd0) || core_done;
  assign fifo_push = (word_idx != 2'd0) && !fifo_full;

  always_comb begin
    unique case (word_idx)
      2'd1:    fifo_wdata = {held.tag, held.score};
      2'd2:    fifo_wdata = {held.tle, held.qle};
      2'd3:    fifo_wdata = {16'h0000, held.gscore};
      default: fifo_wdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= '0;
      word_idx <= 2'd0;
      written  <= 1'b0;
    end else begin
      written <= 1'b0;
      if (word_idx == 2'd0) begin
        if (core_done) begin
          held     <= result;
          word_idx <= 2'd1;
        end
      end else if (!fifo_full) begin
        word_idx <= (word_idx == 2'd3) ? 2'd0 : word_idx + 1'b1;
        if (word_idx == 2'd3) written <= 1'b1;
      end
    end
  end

  a_not_busy: assert property (@(posedge clk) disable iff (!rst_n)
    core_done |-> word_idx == 2'd0);

endmodule
