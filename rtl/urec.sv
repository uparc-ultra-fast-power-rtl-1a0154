// urec: ultra-fast reconfiguration controller (UReC).
//
// UReC moves one preloaded partial bitstream from the bitstream BRAM (its read port B)
// to the ICAP configuration port. It runs entirely on the reconfiguration clock CLK_2
// and needs only a Start request.
//
// Operation (one reconfiguration):
//   1. On start, in the same cycle, BRAM access is enabled and word 0 is read.
//   2. The next cycle decodes the header word: bits 31..1 give the number of
//      configuration words, bit 0 the mode. The read of word 1 is issued in that cycle.
//   3. Direct mode: BRAM port B is read on every clock and each word is written to ICAP
//      one cycle after it leaves the BRAM, so a burst of N words reaches ICAP on N
//      consecutive clocks (one 32-bit word per cycle, the full ICAP bandwidth).
//      Compressed mode: the BRAM words go out on the cmp_* stream to the decompressor
//      (through a 4-entry buffer that absorbs its back-pressure); the decompressed
//      64-bit beats come back on the dec_* stream and are split into 32-bit ICAP writes,
//      low word first.
//   4. After the last ICAP write, finish rises and stays high until the next start;
//      BRAM enable and ICAP chip enable are low whenever no transfer is under way.
//
// Latency, direct mode: with start sampled at edge 0, ICAP sees write k (k = 1..N)
// at edge k+2 and finish is high from edge N+2; start to finish takes N+2 cycles.
//
// ICAP side: icap_ce_n and icap_write_n are active low, as on the Virtex-5 ICAP
// primitive; the controller only writes, so ICAP's Busy and Out lines are not used.
// A header size larger than the memory can hold is clamped to DEPTH-1 words and
// flagged on size_err. The header layout, the two modes, the start/finish handshake
// and the single-burst transfer follow the UPaRC architecture; the counts in words, the stream
// handshakes (valid/ready), the end-of-stream markers, the buffer and the size clamp
// are this implementation's choices.
module urec
  import uparc_pkg::*;
#(
  parameter int unsigned DEPTH = uparc_pkg::BRAM_WORDS,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,          // CLK_2
  input  logic               rst_n,        // asynchronous, active low
  // Manager handshake
  input  logic               start,        // one-cycle request (ignored while busy)
  output logic               finish,       // high from the end of a transfer to the next start
  output logic               busy,
  output logic               size_err,     // header size was clamped
  // BRAM port B
  output logic               bram_en,
  output logic [AW-1:0]      bram_addr,
  input  logic [WORD_W-1:0]  bram_dout,
  // ICAP write port
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [WORD_W-1:0]  icap_i,
  // Compressed words to the decompressor
  output logic               cmp_valid,
  output logic [WORD_W-1:0]  cmp_data,
  output logic               cmp_last,
  input  logic               cmp_ready,
  // Decompressed beats from the decompressor
  input  logic               dec_valid,
  input  logic [DEC_W-1:0]   dec_data,
  input  logic [1:0]         dec_keep,     // [0]: low word valid, [1]: high word valid
  input  logic               dec_last,
  output logic               dec_ready
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_DIRECT, S_COMP, S_FLUSH} state_e;

  localparam int unsigned BUF_N = 4;

  state_e         state;
  logic [AW-1:0]  rd_ptr;       // next BRAM address to read
  logic [AW-1:0]  rd_left;      // reads still to issue
  logic [AW-1:0]  wr_left;      // direct mode: ICAP writes still to do
  logic           rd_pend;      // a word leaves the BRAM in this cycle
  logic           rd_pend_last; // ... and it is the last one
  logic           rd_fire;

  header_t        hdr;
  logic [AW-1:0]  hdr_words;
  logic           hdr_big;

  // Compressed-word buffer (FIFO) feeding the decompressor
  logic [WORD_W-1:0] buf_data [BUF_N];
  logic [BUF_N-1:0]  buf_last;
  logic [1:0]        buf_rd, buf_wr;
  logic [2:0]        buf_cnt;
  logic              buf_push, buf_pop;

  // Width conversion of decompressed beats
  logic              hi_pend;
  logic              hi_last;
  logic [WORD_W-1:0] hi_word;
  logic              dec_fire;

  assign hdr       = header_t'(bram_dout);
  assign hdr_big   = hdr.size > 31'(DEPTH - 1);
  assign hdr_words = hdr_big ? AW'(DEPTH - 1) : hdr.size[AW-1:0];

  // BRAM read issue: enable is driven straight from the state so that start opens the
  // memory in the same cycle.
  always_comb begin
    rd_fire = 1'b0;
    unique case (state)
      S_IDLE:   rd_fire = start;
      S_HDR:    rd_fire = hdr_words != '0;
      S_DIRECT: rd_fire = rd_left != '0;
      S_COMP:   rd_fire = (rd_left != '0) && ({1'b0, buf_cnt} + 4'(rd_pend) <= 4'(BUF_N - 2));
      default:  rd_fire = 1'b0;
    endcase
  end

  assign bram_en   = rd_fire;
  assign bram_addr = (state == S_IDLE) ? '0 : rd_ptr;
  assign busy      = state != S_IDLE;

  // Compressed stream
  assign cmp_valid = buf_cnt != '0;
  assign cmp_data  = buf_data[buf_rd];
  assign cmp_last  = buf_last[buf_rd];
  assign buf_pop   = cmp_valid && cmp_ready;
  assign buf_push  = (state == S_COMP) && rd_pend;

  // Decompressed stream: take a new beat when no upper half is left to send
  assign dec_ready = (state == S_COMP) && !hi_pend;
  assign dec_fire  = dec_valid && dec_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      rd_ptr       <= '0;
      rd_left      <= '0;
      wr_left      <= '0;
      rd_pend      <= 1'b0;
      rd_pend_last <= 1'b0;
      finish       <= 1'b0;
      size_err     <= 1'b0;
      icap_ce_n    <= 1'b1;
      icap_write_n <= 1'b1;
      icap_i       <= '0;
      buf_rd       <= '0;
      buf_wr       <= '0;
      buf_cnt      <= '0;
      buf_last     <= '0;
      hi_pend      <= 1'b0;
      hi_last      <= 1'b0;
      hi_word      <= '0;
    end else begin
      rd_pend      <= rd_fire && (state != S_IDLE);
      rd_pend_last <= rd_fire && (state != S_IDLE) &&
                      ((state == S_HDR) ? (hdr_words == AW'(1)) : (rd_left == AW'(1)));
      if (rd_fire) rd_ptr <= rd_ptr + AW'(1);

      // ICAP write register: idle unless a word is written below
      icap_ce_n    <= 1'b1;
      icap_write_n <= 1'b1;

      // Compressed buffer bookkeeping
      if (buf_push) begin
        buf_data[buf_wr] <= bram_dout;
        buf_last[buf_wr] <= rd_pend_last;
        buf_wr           <= buf_wr + 2'd1;
      end
      if (buf_pop) buf_rd <= buf_rd + 2'd1;
      buf_cnt <= buf_cnt + 3'(buf_push) - 3'(buf_pop);

      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_HDR;
            finish   <= 1'b0;
            size_err <= 1'b0;
            rd_ptr   <= AW'(1);
            buf_rd   <= '0;
            buf_wr   <= '0;
            buf_cnt  <= '0;
            hi_pend  <= 1'b0;
          end
        end

        S_HDR: begin
          size_err <= hdr_big;
          rd_left  <= hdr_words - AW'(hdr_words != '0);
          wr_left  <= hdr_words;
          if (hdr_words == '0)                  state <= S_FLUSH;
          else if (hdr.mode == MODE_COMPRESSED) state <= S_COMP;
          else                                  state <= S_DIRECT;
        end

        S_DIRECT: begin
          if (rd_fire) rd_left <= rd_left - AW'(1);
          if (rd_pend) begin
            icap_ce_n    <= 1'b0;
            icap_write_n <= 1'b0;
            icap_i       <= bram_dout;
            wr_left      <= wr_left - AW'(1);
            if (wr_left == AW'(1)) state <= S_FLUSH;
          end
        end

        S_COMP: begin
          if (rd_fire) rd_left <= rd_left - AW'(1);
          if (hi_pend) begin
            icap_ce_n    <= 1'b0;
            icap_write_n <= 1'b0;
            icap_i       <= hi_word;
            hi_pend      <= 1'b0;
            if (hi_last) state <= S_FLUSH;
          end else if (dec_fire) begin
            if (dec_keep != 2'b00) begin
              icap_ce_n    <= 1'b0;
              icap_write_n <= 1'b0;
              icap_i       <= dec_keep[0] ? dec_data[WORD_W-1:0] : dec_data[DEC_W-1:WORD_W];
            end
            hi_word <= dec_data[DEC_W-1:WORD_W];
            hi_last <= dec_last;
            if (&dec_keep)     hi_pend <= 1'b1;
            else if (dec_last) state   <= S_FLUSH;
          end
        end

        S_FLUSH: begin
          // The last ICAP write is on the port during this cycle.
          state  <= S_IDLE;
          finish <= 1'b1;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules
  // A word offered to the decompressor stays stable until it is taken.
  a_cmp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmp_valid && !cmp_ready |=> cmp_valid && $stable(cmp_data));
  // The buffer never overflows.
  a_buf_bound: assert property (@(posedge clk) disable iff (!rst_n) buf_cnt <= 3'(BUF_N));
  // ICAP is only written while a transfer is under way.
  a_icap_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !icap_ce_n |-> (state == S_DIRECT || state == S_COMP || state == S_FLUSH));

endmodule
