// dcm_model: behavioural model of a Virtex-5 style digital clock manager, only what
// the UPaRC testbenches need: the frequency-synthesis output CLKFX = Fin * M / D, the
// reset, the LOCKED flag and a DRP whose register 0x50 holds {M-1, D-1}. While RST is
// high the output stops and LOCKED is low; LOCKED rises LOCK_NS after RST falls, and
// CLKFX runs from then on. A DRP access is acknowledged by DRDY two DCLK cycles later.
// Not synthesizable: the output clock is made with delays.
module dcm_model #(
  parameter real        FIN_MHZ = 100.0,
  parameter int         M_INIT  = 2,
  parameter int         D_INIT  = 2,
  parameter real        LOCK_NS = 200.0
) (
  input  logic        RST,
  input  logic        DCLK,
  input  logic        DEN,
  input  logic        DWE,
  input  logic [6:0]  DADDR,
  input  logic [15:0] DI,
  output logic [15:0] DO,
  output logic        DRDY,
  output logic        CLKFX,
  output logic        LOCKED
);

  int   m = M_INIT;
  int   d = D_INIT;
  logic [1:0] rdy_sr = '0;

  initial begin
    CLKFX  = 1'b0;
    LOCKED = 1'b0;
    DO     = '0;
    #(LOCK_NS);
    if (!RST) LOCKED = 1'b1;
  end

  assign DRDY = rdy_sr[1];

  always @(posedge DCLK) begin
    rdy_sr <= {rdy_sr[0], DEN};
    if (DEN && DWE && DADDR == 7'h50) begin
      m = int'(DI[15:8]) + 1;
      d = int'(DI[7:0]) + 1;
    end
    if (DEN && !DWE) DO <= (DADDR == 7'h50) ? {8'(m - 1), 8'(d - 1)} : 16'h0;
  end

  always @(posedge RST) LOCKED = 1'b0;

  always @(negedge RST) begin
    #(LOCK_NS);
    if (!RST) LOCKED = 1'b1;
  end

  // Output clock: half period = 1000 / (2 * Fin * M / D) ns
  always begin
    if (LOCKED) begin
      #(500.0 * real'(d) / (FIN_MHZ * real'(m)));
      CLKFX = LOCKED ? ~CLKFX : 1'b0;
    end else begin
      CLKFX = 1'b0;
      @(posedge LOCKED);
    end
  end

endmodule
