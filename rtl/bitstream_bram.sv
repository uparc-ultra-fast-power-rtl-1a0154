// bitstream_bram: dual-port memory that holds the preloaded partial bitstream.
//
// Port A belongs to the manager, which writes the header word and the configuration
// data (and may read them back) on the preload clock CLK_1. Port B belongs to the
// reconfiguration controller, which only reads, on the reconfiguration clock CLK_2.
// Both ports are synchronous: with en high at a rising edge, dout shows the word at
// addr from that edge on (one cycle of read latency); with en low dout holds its value,
// so a disabled port does not toggle. The two clocks are unrelated.
//
// Interface and timing follow the usual FPGA block-RAM behaviour (this design's choice;
// the UPaRC architecture only asks for a dual-port BRAM of 256 KiB with one port per side). Depth
// defaults to 65536 words of 32 bits. A write and a read of the same word on the two
// ports in the same cycle return the old or the new word, as in any true dual-port RAM.
module bitstream_bram #(
  parameter int unsigned WIDTH = uparc_pkg::WORD_W,
  parameter int unsigned DEPTH = uparc_pkg::BRAM_WORDS,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  // Port A: manager side, read/write
  input  logic             clk_a,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_din,
  output logic [WIDTH-1:0] a_dout,
  // Port B: controller side, read only
  input  logic             clk_b,
  input  logic             b_en,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_din;
      a_dout <= mem[a_addr];
    end
  end

  always_ff @(posedge clk_b) begin
    if (b_en) b_dout <= mem[b_addr];
  end

endmodule
