// FPGA side of the BWA-MEM seed-extension accelerator.
//
// The host runs seeding and output generation and hands each seed
// extension to this block: it writes the job words into the write queue
// through the communication handler, requests a start, and is told by
// `irq` when the result words wait in the read queue.
//
//   host bus -> comm_handler -> write queue -> job_loader -> seed_ext_core
//                  ^                                             |
//                  +---- read queue <-------- result_writer <----+
//
// The seed-extension core sweeps the scoring matrix with a chain of N_PU
// processing units; queries longer than the chain are scored in chunks,
// each restarting from the previous chunk's boundary scores.
// N_CORES complete accelerators (handler, queues, loader, core, writer)
// can sit on the same bus; core k answers to device number DEVICE_ID+k
// and has its own interrupt line. One core is the evaluated
// configuration; more cores are the extension the architecture allows
// on a bus with addressing.
// Ports: a generic register bus (select, write, read, 16-bit address
// whose upper byte selects the device, 32-bit data, read data valid one
// cycle after the read), and one interrupt line per core. The PU count
// of 30 is the size of the evaluated device; memory depths, queue depths,
// the scoring scheme and the bus are this design's choices.
module bwa_accel_top
  import bwa_pkg::*;
#(
  parameter int         N_CORES    = 1,
  parameter int         N_PU       = 30,
  parameter int         MAX_QLEN   = 256,
  parameter int         MAX_TLEN   = 256,
  parameter int         ROW_PERIOD = 2,
  parameter int         FIFO_DEPTH = 64,
  parameter logic [7:0] DEVICE_ID  = 8'd1,
  parameter int         MATCH      = 1,
  parameter int         MISMATCH   = 4,
  parameter int         GAP_OPEN   = 6,
  parameter int         GAP_EXT    = 1,
  parameter int         BAND_W     = 100
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bus_sel,
  input  logic               bus_we,
  input  logic               bus_re,
  input  logic [15:0]        bus_addr,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               bus_rvalid,
  output logic [N_CORES-1:0] irq
);

  localparam int CNT_W = $clog2(FIFO_DEPTH) + 1;

  logic [31:0] core_rdata  [N_CORES];
  logic        core_rvalid [N_CORES];

  for (genvar k = 0; k < N_CORES; k++) begin : g_core
    // write queue
    logic        wf_push, wf_pop, wf_full, wf_empty;
    logic [31:0] wf_wdata, wf_rdata;
    logic [CNT_W-1:0] wf_count;
    // read queue
    logic        rf_push, rf_pop, rf_full, rf_empty;
    logic [31:0] rf_wdata, rf_rdata;
    logic [CNT_W-1:0] rf_count;
    // loader to core
    logic        q_we, t_we;
    len_t        q_addr, t_addr, qlen, tlen;
    base_e       q_base, t_base;
    score_t      h0;
    logic [15:0] tag;
    logic        job_ready, core_start, core_busy, core_done;
    ext_result_t result;
    logic        writer_busy, result_written;

    comm_handler #(.DEVICE_ID(DEVICE_ID + 8'(k)), .N_PU(N_PU), .CNT_W(CNT_W)) u_handler (
      .clk, .rst_n,
      .bus_sel, .bus_we, .bus_re, .bus_addr, .bus_wdata,
      .bus_rdata (core_rdata[k]), .bus_rvalid (core_rvalid[k]), .irq (irq[k]),
      .wf_push, .wf_wdata, .wf_full, .wf_count,
      .rf_pop, .rf_rdata, .rf_empty, .rf_count,
      .job_ready, .core_busy, .writer_busy, .result_written, .core_start
    );

    sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_write_fifo (
      .clk, .rst_n,
      .push (wf_push), .wdata (wf_wdata), .pop (wf_pop), .rdata (wf_rdata),
      .full (wf_full), .empty (wf_empty), .count (wf_count)
    );

    job_loader u_loader (
      .clk, .rst_n,
      .fifo_rdata (wf_rdata), .fifo_empty (wf_empty), .fifo_pop (wf_pop),
      .q_we, .q_addr, .q_base, .t_we, .t_addr, .t_base,
      .core_busy, .job_taken (core_start), .job_ready,
      .qlen, .tlen, .h0, .tag
    );

    seed_ext_core #(.N_PU(N_PU), .MAX_QLEN(MAX_QLEN), .MAX_TLEN(MAX_TLEN),
                    .ROW_PERIOD(ROW_PERIOD), .MATCH(MATCH), .MISMATCH(MISMATCH),
                    .GAP_OPEN(GAP_OPEN), .GAP_EXT(GAP_EXT), .BAND_W(BAND_W)) u_core (
      .clk, .rst_n,
      .q_we, .q_addr, .q_base, .t_we, .t_addr, .t_base,
      .start (core_start), .qlen, .tlen, .h0, .tag,
      .busy (core_busy), .done (core_done), .result
    );

    result_writer u_writer (
      .clk, .rst_n,
      .core_done, .result,
      .fifo_full (rf_full), .fifo_push (rf_push), .fifo_wdata (rf_wdata),
      .busy (writer_busy), .written (result_written)
    );

    sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_read_fifo (
      .clk, .rst_n,
      .push (rf_push), .wdata (rf_wdata), .pop (rf_pop), .rdata (rf_rdata),
      .full (rf_full), .empty (rf_empty), .count (rf_count)
    );
  end

  // Only the addressed core answers a read; merge the answers.
  always_comb begin
    bus_rdata  = '0;
    bus_rvalid = 1'b0;
    for (int k = 0; k < N_CORES; k++) begin
      if (core_rvalid[k]) begin
        bus_rdata  = bus_rdata | core_rdata[k];
        bus_rvalid = 1'b1;
      end
    end
  end

endmodule
