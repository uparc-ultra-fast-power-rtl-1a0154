// pulse_sync: carries a one-cycle pulse from clock domain src_clk to dst_clk.
// Each source pulse flips a toggle flop; the toggle is synchronized into the
// destination domain with two flops, and every change seen there gives one dst_clk
// pulse, two to three dst_clk edges after the source pulse. Pulses must be at least
// three destination cycles apart (the manager's Start is far sparser than that).
module pulse_sync (
  input  logic src_clk,
  input  logic dst_clk,
  input  logic rst_n,      // asynchronous, active low, both domains
  input  logic src_pulse,
  output logic dst_pulse
);

  logic tog;
  logic tog_s;
  logic tog_q;

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n)         tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end

  sync_2ff #(.WIDTH(1)) u_sync (.clk(dst_clk), .rst_n(rst_n), .d(tog), .q(tog_s));

  always_ff @(posedge dst_clk or negedge rst_n) begin
    if (!rst_n) tog_q <= 1'b0;
    else        tog_q <= tog_s;
  end

  assign dst_pulse = tog_s ^ tog_q;

endmodule
