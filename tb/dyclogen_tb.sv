// dyclogen_tb: self-checking testbench for DyCloGen with three behavioural DCMs.
//
// Requests new M/D factors for each clock, including the 362.5 MHz setting
// (Fin 100 MHz, M = 29, D = 8), and checks: the DRP write (address 0x50, data
// {M-1, D-1}) reaches only the selected DCM and only while it is in reset, the other
// two DCMs stay untouched, done follows lock, cur_m/cur_d are updated, out-of-range
// requests raise err and change nothing, and the measured period of each output clock
// matches Fin * M / D.
module dyclogen_tb;
  import uparc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;           // Fin = 100 MHz
  logic rst_n = 1'b0;

  logic                req_valid = 1'b0;
  clk_sel_e            req_sel = CLK_PRELOAD;
  logic [7:0]          req_m = '0, req_d = '0;
  logic                req_ready, done, err;
  logic [7:0]          cur_m [NUM_CLKS];
  logic [7:0]          cur_d [NUM_CLKS];
  logic [NUM_CLKS-1:0] dcm_rst, drp_den, drp_dwe, drp_drdy, dcm_locked;
  logic [6:0]          drp_daddr;
  logic [15:0]         drp_di;
  logic [NUM_CLKS-1:0] clkfx;

  dyclogen dut (.*);

  for (genvar g = 0; g < NUM_CLKS; g++) begin : g_dcm
    logic [15:0] dout;
    dcm_model #(.FIN_MHZ(100.0), .M_INIT(2), .D_INIT(2), .LOCK_NS(300.0)) u_dcm (
      .RST(dcm_rst[g]), .DCLK(clk), .DEN(drp_den[g]), .DWE(drp_dwe[g]), .DADDR(drp_daddr),
      .DI(drp_di), .DO(dout), .DRDY(drp_drdy[g]), .CLKFX(clkfx[g]), .LOCKED(dcm_locked[g])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // DRP write log
  int unsigned       wr_cnt [NUM_CLKS];
  logic [15:0]       wr_di  [NUM_CLKS];
  logic [6:0]        wr_ad  [NUM_CLKS];
  bit                wr_in_rst [NUM_CLKS];
  always @(posedge clk) begin
    for (int i = 0; i < NUM_CLKS; i++)
      if (drp_den[i] && drp_dwe[i]) begin
        wr_cnt[i]++;
        wr_di[i]     = drp_di;
        wr_ad[i]     = drp_daddr;
        wr_in_rst[i] = dcm_rst[i];
      end
  end

  // Period of clkfx[i] in ps, averaged over 64 cycles
  task automatic measure(input int i, output real mhz);
    realtime t0, t1;
    @(posedge clkfx[i]);
    t0 = $realtime;
    repeat (64) @(posedge clkfx[i]);
    t1 = $realtime;
    mhz = 64.0 * 1000.0 / real'(t1 - t0);
  endtask

  task automatic set_clock(input int i, input int m, input int d, input bit expect_ok);
    int unsigned prev_cnt [NUM_CLKS];
    int unsigned cyc;
    real mhz, want;
    for (int k = 0; k < NUM_CLKS; k++) prev_cnt[k] = wr_cnt[k];
    wait (req_ready);
    @(negedge clk);
    req_valid = 1'b1; req_sel = clk_sel_e'(i); req_m = 8'(m); req_d = 8'(d);
    @(negedge clk);
    req_valid = 1'b0;
    if (!expect_ok) begin
      check(err && req_ready, $sformatf("M=%0d D=%0d rejected", m, d));
      for (int k = 0; k < NUM_CLKS; k++) check(wr_cnt[k] == prev_cnt[k], "no DRP write on reject");
      return;
    end
    cyc = 0;
    while (!done && cyc < 2000) begin
      @(negedge clk);
      cyc++;
    end
    check(done, $sformatf("done for clock %0d", i));
    check(!err, "no error");
    for (int k = 0; k < NUM_CLKS; k++)
      check(wr_cnt[k] == prev_cnt[k] + ((k == i) ? 1 : 0), $sformatf("DRP writes on DCM %0d", k));
    check(wr_ad[i] == 7'h50 && wr_di[i] == {8'(m - 1), 8'(d - 1)},
          $sformatf("DRP write %h@%h", wr_di[i], wr_ad[i]));
    check(wr_in_rst[i], "DRP write while DCM in reset");
    @(negedge clk);
    check(cur_m[i] == 8'(m) && cur_d[i] == 8'(d), "cur_m/cur_d updated");
    want = 100.0 * real'(m) / real'(d);
    measure(i, mhz);
    check(mhz > want * 0.995 && mhz < want * 1.005,
          $sformatf("clock %0d at %f MHz, expected %f", i, mhz, want));
  endtask

  initial begin
    real mhz;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(req_ready && !done && !err && dcm_rst == '0, "reset state");
    check(cur_m[1] == 8'd2 && cur_d[1] == 8'd2, "initial factors");
    wait (&dcm_locked);
    measure(1, mhz);
    check(mhz > 99.5 && mhz < 100.5, "initial clock at Fin");
    set_clock(1, 29, 8, 1'b1);     // CLK_2 at 362.5 MHz
    set_clock(2, 12, 10, 1'b1);    // CLK_3 at 120 MHz
    set_clock(0, 2, 1, 1'b1);      // CLK_1 at 200 MHz
    set_clock(1, 2, 4, 1'b1);      // CLK_2 down to 50 MHz
    set_clock(1, 3, 1, 1'b1);      // CLK_2 at 300 MHz
    set_clock(1, 1, 1, 1'b0);      // M below range
    set_clock(2, 34, 1, 1'b0);     // M above range
    set_clock(2, 5, 0, 1'b0);      // D = 0
    set_clock(0, 4, 33, 1'b0);     // D above range
    set_clock(2, 33, 32, 1'b1);    // both at their top values
    check(cur_m[1] == 8'd3 && cur_d[1] == 8'd1, "other clocks kept their factors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
