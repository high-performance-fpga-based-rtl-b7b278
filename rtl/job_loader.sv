// Job loader: moves a job description from the host's write queue into
// the core's query and target memories.
//
// A job arrives as consecutive 32-bit words:
//   word 0      : target length [31:16], query length [15:0]
//   word 1      : job tag [31:16], seed score h0 (signed) [15:0]
//   query words : ceil(qlen/16) words, base k of a word in bits [2k+1:2k]
//   target words: ceil(tlen/16) words, same packing
// Bases are A=0, C=1, G=2, T=3. The loader only takes a new job while
// the core is idle and no loaded job is waiting, so the host may keep
// queueing the next job while the core runs. It unpacks one base per
// cycle into the memory write ports and then raises `job_ready` with
// the job's lengths, seed score and tag; `job_taken` (the core being
// started) clears it. The word format is this design's own; the
// description only says the queued words are stored into memory and
// taken by the core.
module job_loader
  import bwa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // write queue (show-ahead)
  input  logic [31:0] fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_pop,
  // core memories
  output logic        q_we,
  output len_t        q_addr,
  output base_e       q_base,
  output logic        t_we,
  output len_t        t_addr,
  output base_e       t_base,
  // job hand-over
  input  logic        core_busy,
  input  logic        job_taken,
  output logic        job_ready,
  output len_t        qlen,
  output len_t        tlen,
  output score_t      h0,
  output logic [15:0] tag
);

  typedef enum logic [2:0] {L_HDR0, L_HDR1, L_QWORD, L_TWORD, L_UNPACK, L_READY} ld_state_e;
  ld_state_e   state;
  logic [31:0] word;
  logic [4:0]  slot;       // base within the current word
  len_t        idx;        // base index within the current string
  logic        in_target;  // unpacking target (1) or query (0)

  logic can_take;
  assign can_take = !core_busy && !fifo_empty;

  always_comb begin
    fifo_pop = 1'b0;
    unique case (state)
      L_HDR0, L_HDR1, L_QWORD, L_TWORD: fifo_pop = can_take;
      default: fifo_pop = 1'b0;
    endcase
  end

  base_e cur_base;
  assign cur_base = base_e'(word[2*slot[3:0] +: 2]);

  assign q_we   = (state == L_UNPACK) && !in_target;
  assign t_we   = (state == L_UNPACK) && in_target;
  assign q_addr = idx;
  assign t_addr = idx;
  assign q_base = cur_base;
  assign t_base = cur_base;
  assign job_ready = (state == L_READY);

  len_t cur_len;
  assign cur_len = in_target ? tlen : qlen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= L_HDR0;
      word      <= '0;
      slot      <= '0;
      idx       <= '0;
      in_target <= 1'b0;
      qlen      <= '0;
      tlen      <= '0;
      h0        <= '0;
      tag       <= '0;
    end else begin
      unique case (state)
        L_HDR0: if (can_take) begin
          qlen  <= fifo_rdata[15:0];
          tlen  <= fifo_rdata[31:16];
          state <= L_HDR1;
        end
        L_HDR1: if (can_take) begin
          h0        <= score_t'(fifo_rdata[15:0]);
          tag       <= fifo_rdata[31:16];
          idx       <= '0;
          in_target <= 1'b0;
          state     <= (qlen != 0) ? L_QWORD : (tlen != 0) ? L_TWORD : L_READY;
          if (qlen == 0) in_target <= 1'b1;
        end
        L_QWORD, L_TWORD: if (can_take) begin
          word  <= fifo_rdata;
          slot  <= '0;
          state <= L_UNPACK;
        end
        L_UNPACK: begin
          idx  <= idx + 1'b1;
          slot <= slot + 1'b1;
          if (idx + 1'b1 == cur_len) begin
            idx <= '0;
            if (!in_target && tlen != 0) begin
              in_target <= 1'b1;
              state     <= L_TWORD;
            end else begin
              state <= L_READY;
            end
          end else if (slot == 5'd15) begin
            state <= in_target ? L_TWORD : L_QWORD;
          end
        end
        L_READY: if (job_taken) state <= L_HDR0;
        default: state <= L_HDR0;
      endcase
    end
  end

endmodule
