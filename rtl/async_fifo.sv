// async_fifo: first-word-fall-through FIFO between two unrelated clocks.
//
// Write and read pointers are kept in binary and in Gray code; each side synchronizes
// the other side's Gray pointer with two flops and compares it with its own pointer
// (one extra wrap bit tells full from empty). Full and empty are therefore
// pessimistic by the synchronizer delay but never wrong. Both sides use valid/ready:
// a word moves on a clock edge where valid and ready are both high. rdata shows the
// oldest word whenever rvalid is high.
// In UPaRC it carries compressed words from the reconfiguration clock to the
// decompressor clock and decompressed beats back; the UPaRC architecture runs the two blocks
// at different frequencies, the FIFO structure is this implementation's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 4          // 2**AW entries
) (
  input  logic             wclk,
  input  logic             rclk,
  input  logic             rst_n,           // asynchronous, active low, both domains
  input  logic             wvalid,
  input  logic [WIDTH-1:0] wdata,
  output logic             wready,
  output logic             rvalid,
  output logic [WIDTH-1:0] rdata,
  input  logic             rready
);

  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s, rgray_s;            // other side's pointer, synchronized
  logic [AW:0] wbin_nx, rbin_nx;

  assign wbin_nx = wbin + (AW+1)'(wvalid && wready);
  assign rbin_nx = rbin + (AW+1)'(rvalid && rready);

  // Write side
  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_nx;
      wgray <= wbin_nx ^ (wbin_nx >> 1);
    end
  end

  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wbin[AW-1:0]] <= wdata;
  end

  sync_2ff #(.WIDTH(AW+1)) u_rsync (.clk(wclk), .rst_n(rst_n), .d(rgray), .q(rgray_s));

  assign wready = wgray != {~rgray_s[AW:AW-1], rgray_s[AW-2:0]};

  // Read side
  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_nx;
      rgray <= rbin_nx ^ (rbin_nx >> 1);
    end
  end

  sync_2ff #(.WIDTH(AW+1)) u_wsync (.clk(rclk), .rst_n(rst_n), .d(wgray), .q(wgray_s));

  assign rvalid = rgray != wgray_s;
  assign rdata  = mem[rbin[AW-1:0]];

endmodule
