// Communication handler: the accelerator's register interface on a
// generic host bus, and its event-driven control.
//
// The host sees five 32-bit registers at byte offsets inside the page
// selected by its device number (bus_addr[15:8] == DEVICE_ID, so several
// accelerators can share one bus):
//   0x00 ID      (R) device number [7:0], PU count [31:16]
//   0x04 CTRL    (W) bit0 start request, bit1 clear event
//   0x08 STATUS  (R) bit0 result valid (read queue not empty),
//                    bit1 core busy, bit2 job loaded, bit3 event,
//                    bit4 start pending, bit5 write queue full,
//                    bit6 write overflow (sticky), [23:16] result words,
//                    [31:24] words waiting in the write queue
//   0x0C DATA    (W) push a word into the write queue
//   0x10 RESULT  (R) pop a word from the read queue (0 if empty)
// Reads answer on the cycle after `bus_re` with `bus_rvalid`.
// The exchange follows an event-driven scheme: the host queues a job,
// writes the start request and goes on with other work; the request waits
// until the job is loaded and the core and result writer are idle, then
// starts the core. When the last result word is queued the event flag
// rises and drives `irq`; the host checks the valid flag, reads the
// result words, and clears the event. Register map, bit layout and bus
// timing are this design's choices; the description gives the queues,
// the start request, the event, the valid flag and the device number.
module comm_handler #(
  parameter logic [7:0] DEVICE_ID = 8'd1,
  parameter int         N_PU      = 30,
  parameter int         CNT_W     = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  // host bus
  input  logic             bus_sel,
  input  logic             bus_we,
  input  logic             bus_re,
  input  logic [15:0]      bus_addr,
  input  logic [31:0]      bus_wdata,
  output logic [31:0]      bus_rdata,
  output logic             bus_rvalid,
  output logic             irq,
  // write queue
  output logic             wf_push,
  output logic [31:0]      wf_wdata,
  input  logic             wf_full,
  // read queue
  output logic             rf_pop,
  input  logic [31:0]      rf_rdata,
  input  logic             rf_empty,
  input  logic [CNT_W-1:0] rf_count,
  input  logic [CNT_W-1:0] wf_count,
  // core control
  input  logic             job_ready,
  input  logic             core_busy,
  input  logic             writer_busy,
  input  logic             result_written,
  output logic             core_start
);

  localparam logic [7:0] REG_ID     = 8'h00;
  localparam logic [7:0] REG_CTRL   = 8'h04;
  localparam logic [7:0] REG_STATUS = 8'h08;
  localparam logic [7:0] REG_DATA   = 8'h0C;
  localparam logic [7:0] REG_RESULT = 8'h10;

  logic hit, wr, rd;
  assign hit = bus_sel && (bus_addr[15:8] == DEVICE_ID);
  assign wr  = hit && bus_we;
  assign rd  = hit && bus_re && !bus_we;

  logic start_pending, event_flag, overflow;

  assign wf_push    = wr && bus_addr[7:0] == REG_DATA && !wf_full;
  assign wf_wdata   = bus_wdata;
  assign rf_pop     = rd && bus_addr[7:0] == REG_RESULT && !rf_empty;
  assign core_start = start_pending && job_ready && !core_busy && !writer_busy;
  assign irq        = event_flag;

  logic [31:0] status;
  always_comb begin
    status        = '0;
    status[0]     = !rf_empty;
    status[1]     = core_busy;
    status[2]     = job_ready;
    status[3]     = event_flag;
    status[4]     = start_pending;
    status[5]     = wf_full;
    status[6]     = overflow;
    status[23:16] = 8'(rf_count);
    status[31:24] = 8'(wf_count);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_pending <= 1'b0;
      event_flag    <= 1'b0;
      overflow      <= 1'b0;
      bus_rdata     <= '0;
      bus_rvalid    <= 1'b0;
    end else begin
      bus_rvalid <= rd;
      if (rd) begin
        unique case (bus_addr[7:0])
          REG_ID:     bus_rdata <= {16'(N_PU), 8'h00, DEVICE_ID};
          REG_STATUS: bus_rdata <= status;
          REG_RESULT: bus_rdata <= rf_empty ? 32'h0 : rf_rdata;
          default:    bus_rdata <= 32'h0;
        endcase
      end
      if (core_start) start_pending <= 1'b0;
      if (wr && bus_addr[7:0] == REG_CTRL && bus_wdata[0]) start_pending <= 1'b1;
      if (wr && bus_addr[7:0] == REG_DATA && wf_full) overflow <= 1'b1;
      if (wr && bus_addr[7:0] == REG_CTRL && bus_wdata[1]) event_flag <= 1'b0;
      if (result_written) event_flag <= 1'b1;
    end
  end

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(bus_sel && bus_we && bus_re));

endmodule
