// uparc: UPaRC, an ultra-fast power-aware reconfiguration controller.
//
// A manager (a processor or a small state machine outside this module) preloads a
// partial bitstream into the bitstream BRAM, then pulses start. UReC reads the header
// word, bursts the configuration data from BRAM to the ICAP port at one 32-bit word
// per CLK_2 cycle (or through the decompressor in compressed mode) and reports finish.
// DyCloGen retunes the three clocks through the DRPs of their DCMs, so the manager
// can trade reconfiguration speed against power at run time.
//
// Clock domains:
//   clk_1   CLK_1, preloading: BRAM port A, start and finish
//   clk_2   CLK_2, reconfiguration: UReC, BRAM port B, ICAP (its CLK is clk_2)
//   clk_3   CLK_3, decompression: the dec_in_* / dec_out_* ports
//   clk_drp Fin, the DCM input clock, which also clocks DyCloGen and its DRP ports
// The DCMs, the ICAP primitive and the decompressor are outside this module; their
// signals are ports. clk_1..clk_3 are the outputs of the DCMs that DyCloGen controls.
//
// Crossings (this implementation's choice; the UPaRC architecture only has the blocks on
// different clocks): start goes clk_1 -> clk_2 through a toggle synchronizer (2-3
// cycles of clk_2); finish goes back through a two-flop synchronizer and is held in a
// clk_1 flag that start clears and the rising edge of UReC's finish sets. Compressed
// words go clk_2 -> clk_3 and decompressed 64-bit beats clk_3 -> clk_2 through
// asynchronous FIFOs of 16 entries.
//
// Decompressor interface: dec_in carries the compressed words of one bitstream in
// BRAM order, dec_in_last marking the final one; dec_out returns 64-bit beats, the low
// word going to ICAP first, dec_out_keep telling which halves hold data, dec_out_last
// marking the end of the decompressed bitstream.
module uparc
  import uparc_pkg::*;
#(
  parameter int unsigned DEPTH   = uparc_pkg::BRAM_WORDS,   // BRAM words (256 KiB)
  parameter int unsigned FIFO_AW = 4,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic                 clk_1,
  input  logic                 clk_2,
  input  logic                 clk_3,
  input  logic                 clk_drp,
  input  logic                 rst_n,
  // Manager: bitstream preloading (clk_1)
  input  logic                 bram_a_en,
  input  logic                 bram_a_we,
  input  logic [AW-1:0]        bram_a_addr,
  input  logic [WORD_W-1:0]    bram_a_din,
  output logic [WORD_W-1:0]    bram_a_dout,
  // Manager: reconfiguration control (clk_1)
  input  logic                 start,
  output logic                 finish,
  output logic                 size_err,
  output logic                 busy,         // UReC busy, synchronized to clk_1
  // Manager: frequency adaptation (clk_drp)
  input  logic                 clk_req_valid,
  input  clk_sel_e             clk_req_sel,
  input  logic [7:0]           clk_req_m,
  input  logic [7:0]           clk_req_d,
  output logic                 clk_req_ready,
  output logic                 clk_done,
  output logic                 clk_err,
  output logic [7:0]           clk_cur_m [NUM_CLKS],
  output logic [7:0]           clk_cur_d [NUM_CLKS],
  // DCMs (clk_drp)
  output logic [NUM_CLKS-1:0]  dcm_rst,
  output logic [NUM_CLKS-1:0]  drp_den,
  output logic [NUM_CLKS-1:0]  drp_dwe,
  output logic [6:0]           drp_daddr,
  output logic [15:0]          drp_di,
  input  logic [NUM_CLKS-1:0]  drp_drdy,
  input  logic [NUM_CLKS-1:0]  dcm_locked,
  // ICAP (clk_2)
  output logic                 icap_ce_n,
  output logic                 icap_write_n,
  output logic [WORD_W-1:0]    icap_i,
  // Decompressor (clk_3)
  output logic                 dec_in_valid,
  output logic [WORD_W-1:0]    dec_in_data,
  output logic                 dec_in_last,
  input  logic                 dec_in_ready,
  input  logic                 dec_out_valid,
  input  logic [DEC_W-1:0]     dec_out_data,
  input  logic [1:0]           dec_out_keep,
  input  logic                 dec_out_last,
  output logic                 dec_out_ready
);

  // ---------------- BRAM ----------------
  logic              b_en;
  logic [AW-1:0]     b_addr;
  logic [WORD_W-1:0] b_dout;

  bitstream_bram #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_bram (
    .clk_a (clk_1), .a_en(bram_a_en), .a_we(bram_a_we), .a_addr(bram_a_addr),
    .a_din (bram_a_din), .a_dout(bram_a_dout),
    .clk_b (clk_2), .b_en(b_en), .b_addr(b_addr), .b_dout(b_dout)
  );

  // ---------------- Start / Finish crossing ----------------
  logic urec_busy;
  logic start_2, finish_2, size_err_2, finish_1s, finish_1q;

  pulse_sync u_start_sync (
    .src_clk(clk_1), .dst_clk(clk_2), .rst_n(rst_n), .src_pulse(start), .dst_pulse(start_2)
  );

  sync_2ff #(.WIDTH(3)) u_finish_sync (
    .clk(clk_1), .rst_n(rst_n), .d({finish_2, size_err_2, urec_busy}),
    .q({finish_1s, size_err, busy})
  );

  always_ff @(posedge clk_1 or negedge rst_n) begin
    if (!rst_n) begin
      finish_1q <= 1'b0;
      finish    <= 1'b0;
    end else begin
      finish_1q <= finish_1s;
      if (start)                         finish <= 1'b0;
      else if (finish_1s && !finish_1q)  finish <= 1'b1;
    end
  end

  // ---------------- UReC ----------------
  logic              cmp_valid, cmp_last, cmp_ready;
  logic [WORD_W-1:0] cmp_data;
  logic              dec_valid, dec_last, dec_ready;
  logic [DEC_W-1:0]  dec_data;
  logic [1:0]        dec_keep;

  urec #(.DEPTH(DEPTH)) u_urec (
    .clk(clk_2), .rst_n(rst_n),
    .start(start_2), .finish(finish_2), .busy(urec_busy), .size_err(size_err_2),
    .bram_en(b_en), .bram_addr(b_addr), .bram_dout(b_dout),
    .icap_ce_n(icap_ce_n), .icap_write_n(icap_write_n), .icap_i(icap_i),
    .cmp_valid(cmp_valid), .cmp_data(cmp_data), .cmp_last(cmp_last), .cmp_ready(cmp_ready),
    .dec_valid(dec_valid), .dec_data(dec_data), .dec_keep(dec_keep), .dec_last(dec_last),
    .dec_ready(dec_ready)
  );

  // ---------------- Decompressor crossings ----------------
  async_fifo #(.WIDTH(WORD_W + 1), .AW(FIFO_AW)) u_cmp_fifo (
    .wclk(clk_2), .rclk(clk_3), .rst_n(rst_n),
    .wvalid(cmp_valid), .wdata({cmp_last, cmp_data}), .wready(cmp_ready),
    .rvalid(dec_in_valid), .rdata({dec_in_last, dec_in_data}), .rready(dec_in_ready)
  );

  async_fifo #(.WIDTH(DEC_W + 3), .AW(FIFO_AW)) u_dec_fifo (
    .wclk(clk_3), .rclk(clk_2), .rst_n(rst_n),
    .wvalid(dec_out_valid), .wdata({dec_out_last, dec_out_keep, dec_out_data}),
    .wready(dec_out_ready),
    .rvalid(dec_valid), .rdata({dec_last, dec_keep, dec_data}), .rready(dec_ready)
  );

  // ---------------- DyCloGen ----------------
  dyclogen u_dyclogen (
    .clk(clk_drp), .rst_n(rst_n),
    .req_valid(clk_req_valid), .req_sel(clk_req_sel), .req_m(clk_req_m), .req_d(clk_req_d),
    .req_ready(clk_req_ready), .done(clk_done), .err(clk_err),
    .cur_m(clk_cur_m), .cur_d(clk_cur_d),
    .dcm_rst(dcm_rst), .drp_den(drp_den), .drp_dwe(drp_dwe),
    .drp_daddr(drp_daddr), .drp_di(drp_di), .drp_drdy(drp_drdy), .dcm_locked(dcm_locked)
  );

endmodule
