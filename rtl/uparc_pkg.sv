// uparc_pkg: types and constants shared by the UPaRC reconfiguration controller.
//
// The bitstream memory holds one partial bitstream at a time. Word 0 is a header
// written by the manager; the configuration data follows from word 1 on:
//
//     bit 31 ............................ 1 | 0
//     [        bitstream size             | mode ]
//
// Mode 0 sends the data straight to ICAP, mode 1 routes it through the
// decompressor. The header layout and the two modes follow the UPaRC architecture; counting the
// size in 32-bit words (not bytes) is this implementation's choice.
// The memory is 256 KiB of 32-bit words (65536 words).
package uparc_pkg;

  localparam int unsigned WORD_W     = 32;         // BRAM, ICAP and header word width
  localparam int unsigned BRAM_BYTES = 262144;     // 256 KiB bitstream memory
  localparam int unsigned BRAM_WORDS = BRAM_BYTES / (WORD_W / 8);
  localparam int unsigned DEC_W      = 64;         // decompressor output: 2 words per cycle

  // Operating mode in bit 0 of the header word.
  typedef enum logic {
    MODE_DIRECT     = 1'b0,   // preloading without compression
    MODE_COMPRESSED = 1'b1    // preloading with compression
  } mode_e;

  // Header word at BRAM address 0.
  typedef struct packed {
    logic [30:0] size;        // number of 32-bit configuration words that follow
    mode_e       mode;
  } header_t;

  // Number of clocks that DyCloGen drives.
  localparam int unsigned NUM_CLKS = 3;

  // Clock index for the DyCloGen request interface.
  typedef enum logic [1:0] {
    CLK_PRELOAD  = 2'd0,      // CLK_1: BRAM preloading (port A)
    CLK_RECONF   = 2'd1,      // CLK_2: UReC, BRAM port B and ICAP
    CLK_DECOMP   = 2'd2       // CLK_3: decompressor
  } clk_sel_e;

endpackage
