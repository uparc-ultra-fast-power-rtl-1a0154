// bitstream_bram_tb: self-checking testbench for the dual-port bitstream memory at
// its full default size (65536 x 32 bit). Port A writes random words at random and at
// boundary addresses on one clock; both ports read them back on unrelated clocks.
// Checks the data, the one-cycle read latency of both ports, that a disabled port
// holds its output, and that the two ports address one shared array.
module bitstream_bram_tb;
  import uparc_pkg::*;

  localparam int unsigned DEPTH = BRAM_WORDS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk_a = 1'b0, clk_b = 1'b0;
  always #5   clk_a = ~clk_a;
  always #3.7 clk_b = ~clk_b;

  logic              a_en = 1'b0, a_we = 1'b0, b_en = 1'b0;
  logic [AW-1:0]     a_addr = '0, b_addr = '0;
  logic [WORD_W-1:0] a_din = '0, a_dout, b_dout;

  bitstream_bram dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [WORD_W-1:0] ref_mem [logic [AW-1:0]];
  logic [AW-1:0]     addrs [$];

  task automatic write_a(input logic [AW-1:0] ad, input logic [WORD_W-1:0] d);
    @(negedge clk_a);
    a_en = 1'b1; a_we = 1'b1; a_addr = ad; a_din = d;
    @(negedge clk_a);
    a_en = 1'b0; a_we = 1'b0;
    ref_mem[ad] = d;
  endtask

  task automatic read_b(input logic [AW-1:0] ad);
    @(negedge clk_b);
    b_en = 1'b1; b_addr = ad;
    @(posedge clk_b); #0.5;
    check(b_dout == ref_mem[ad], $sformatf("port B addr %0h: %h expected %h", ad, b_dout, ref_mem[ad]));
    @(negedge clk_b);
    b_en = 1'b0; b_addr = ad ^ AW'(1);       // different address, port disabled
    @(posedge clk_b); #0.5;
    check(b_dout == ref_mem[ad], "port B holds its output while disabled");
  endtask

  task automatic read_a(input logic [AW-1:0] ad);
    @(negedge clk_a);
    a_en = 1'b1; a_we = 1'b0; a_addr = ad;
    @(posedge clk_a); #0.5;
    check(a_dout == ref_mem[ad], $sformatf("port A addr %0h", ad));
    @(negedge clk_a);
    a_en = 1'b0;
  endtask

  initial begin
    addrs.push_back('0);
    addrs.push_back(AW'(1));
    addrs.push_back(AW'(DEPTH - 1));
    for (int i = 0; i < 200; i++) addrs.push_back(AW'($urandom()));
    foreach (addrs[i]) write_a(addrs[i], $urandom());
    foreach (addrs[i]) read_b(addrs[i]);
    for (int i = 0; i < 20; i++) read_a(addrs[i]);
    // overwrite and read again through port B
    write_a(AW'(DEPTH - 1), 32'hCAFE_F00D);
    read_b(AW'(DEPTH - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
