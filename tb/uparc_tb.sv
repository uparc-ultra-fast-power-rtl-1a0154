// uparc_tb: end-to-end testbench of UPaRC at its default size (256 KiB BRAM).
//
// Three behavioural DCMs make CLK_1..CLK_3 from a 100 MHz Fin under DyCloGen's
// control, a behavioural decompressor (a simple run-length code) closes the
// compressed path, and the testbench plays the manager: it retunes clocks, preloads
// the header and data through BRAM port A, pulses start and waits for finish.
// ICAP writes are captured on CLK_2 and compared with the expected bitstream.
//
// Mechanisms exercised and counted (each must happen at least once):
//   direct-mode reconfigurations, compressed-mode reconfigurations, a zero-size
//   header, DCM retuning through the DRP, a rejected clock request, back-pressure
//   from the decompressor path, and the gap-free burst (one word per CLK_2 cycle).
// Timing checks: the direct burst takes exactly N-1 CLK_2 cycles from first to last
// ICAP write; doubling CLK_2 halves the reconfiguration time; at 362.5 MHz
// (M = 29, D = 8) a 247 KiB bitstream streams at 4 bytes x 362.5 MHz = 1450 MB/s.
module uparc_tb;
  import uparc_pkg::*;

  localparam int unsigned AW = $clog2(BRAM_WORDS);

  logic clk_drp = 1'b0;
  always #5 clk_drp = ~clk_drp;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous resets act before any clock runs

  logic clk_1, clk_2, clk_3;

  // Manager-side signals
  logic              bram_a_en = 1'b0, bram_a_we = 1'b0;
  logic [AW-1:0]     bram_a_addr = '0;
  logic [WORD_W-1:0] bram_a_din = '0, bram_a_dout;
  logic              start = 1'b0, finish, size_err, busy;
  logic              clk_req_valid = 1'b0;
  clk_sel_e          clk_req_sel = CLK_PRELOAD;
  logic [7:0]        clk_req_m = '0, clk_req_d = '0;
  logic              clk_req_ready, clk_done, clk_err;
  logic [7:0]        clk_cur_m [NUM_CLKS];
  logic [7:0]        clk_cur_d [NUM_CLKS];
  logic [NUM_CLKS-1:0] dcm_rst, drp_den, drp_dwe, drp_drdy, dcm_locked;
  logic [6:0]        drp_daddr;
  logic [15:0]       drp_di;
  logic              icap_ce_n, icap_write_n;
  logic [WORD_W-1:0] icap_i;
  logic              dec_in_valid, dec_in_last, dec_in_ready;
  logic [WORD_W-1:0] dec_in_data;
  logic              dec_out_valid, dec_out_last, dec_out_ready;
  logic [DEC_W-1:0]  dec_out_data;
  logic [1:0]        dec_out_keep;
  logic [NUM_CLKS-1:0] clkfx;

  assign clk_1 = clkfx[0];
  assign clk_2 = clkfx[1];
  assign clk_3 = clkfx[2];

  uparc dut (.*);

  for (genvar g = 0; g < NUM_CLKS; g++) begin : g_dcm
    logic [15:0] dout;
    dcm_model #(.FIN_MHZ(100.0), .M_INIT(2), .D_INIT(2), .LOCK_NS(300.0)) u_dcm (
      .RST(dcm_rst[g]), .DCLK(clk_drp), .DEN(drp_den[g]), .DWE(drp_dwe[g]),
      .DADDR(drp_daddr), .DI(drp_di), .DO(dout), .DRDY(drp_drdy[g]), .CLKFX(clkfx[g]),
      .LOCKED(dcm_locked[g])
    );
  end

  decomp_model #(.STALL(1'b1)) u_dec (
    .clk(clk_3),
    .in_valid(dec_in_valid), .in_data(dec_in_data), .in_last(dec_in_last), .in_ready(dec_in_ready),
    .out_valid(dec_out_valid), .out_data(dec_out_data), .out_keep(dec_out_keep),
    .out_last(dec_out_last), .out_ready(dec_out_ready)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters
  int unsigned n_direct = 0, n_comp = 0, n_zero = 0, n_retune = 0, n_reject = 0;
  int unsigned n_backpressure = 0, n_gapfree = 0;

  // ICAP capture on CLK_2
  logic [WORD_W-1:0] got [$];
  longint unsigned   cyc2 = 0, first_cyc, last_cyc;
  realtime           first_t, last_t;
  always @(posedge clk_2) begin
    cyc2++;
    if (!icap_ce_n && !icap_write_n) begin
      if (got.size() == 0) begin
        first_cyc = cyc2;
        first_t   = $realtime;
      end
      got.push_back(icap_i);
      last_cyc = cyc2;
      last_t   = $realtime;
    end
    if (dut.u_urec.cmp_valid && !dut.u_urec.cmp_ready) n_backpressure++;
  end

  // ---------------- Manager tasks ----------------
  task automatic set_clock(input clk_sel_e sel, input int m, input int d, input bit ok);
    wait (clk_req_ready);
    @(negedge clk_drp);
    clk_req_valid = 1'b1; clk_req_sel = sel; clk_req_m = 8'(m); clk_req_d = 8'(d);
    @(negedge clk_drp);
    clk_req_valid = 1'b0;
    if (!ok) begin
      check(clk_err, "out-of-range clock request rejected");
      n_reject++;
      return;
    end
    fork
      wait (clk_done);
      repeat (5000) @(posedge clk_drp);
    join_any
    disable fork;
    check(clk_cur_m[sel] == 8'(m) && clk_cur_d[sel] == 8'(d), $sformatf("clock %0d retuned", sel));
    n_retune++;
    wait (dcm_locked[sel]);
    repeat (4) @(posedge clk_drp);
  endtask

  task automatic preload(input logic [WORD_W-1:0] words [$], input mode_e mode);
    @(negedge clk_1);
    bram_a_en = 1'b1; bram_a_we = 1'b1;
    bram_a_addr = '0; bram_a_din = {31'(words.size()), mode};
    foreach (words[i]) begin
      @(negedge clk_1);
      bram_a_addr = AW'(i + 1); bram_a_din = words[i];
    end
    @(negedge clk_1);
    bram_a_we = 1'b0; bram_a_addr = '0;        // read the header back through port A
    @(negedge clk_1);
    bram_a_en = 1'b0;
    check(bram_a_dout == {31'(words.size()), mode}, "header read back on port A");
  endtask

  task automatic reconfigure(input logic [WORD_W-1:0] expect_w [$], output realtime dur);
    realtime t0;
    bit ok;
    got.delete();
    @(negedge clk_1);
    start = 1'b1;
    t0 = $realtime;
    @(negedge clk_1);
    start = 1'b0;
    check(!finish, "finish low after start");
    fork
      wait (finish);
      #(20ms);
    join_any
    disable fork;
    dur = $realtime - t0;
    check(finish, "finish raised");
    repeat (4) @(posedge clk_1);
    check(!busy, "controller idle after finish");
    check(got.size() == expect_w.size(),
          $sformatf("ICAP words %0d expected %0d", got.size(), expect_w.size()));
    ok = 1'b1;
    foreach (expect_w[i]) if (i < got.size() && got[i] != expect_w[i]) ok = 1'b0;
    check(ok, "ICAP data matches the bitstream");
  endtask

  // Random bitstream words
  function automatic void make_words(input int n, output logic [WORD_W-1:0] w [$]);
    w.delete();
    for (int i = 0; i < n; i++) w.push_back($urandom());
  endfunction

  // Run-length encoding for the behavioural decompressor
  function automatic void make_compressed(input int n, output logic [WORD_W-1:0] orig [$],
                                          output logic [WORD_W-1:0] comp [$]);
    orig.delete(); comp.delete();
    while (orig.size() < n) begin
      int len;
      logic [WORD_W-1:0] v;
      if ($urandom_range(0, 1) == 0) begin
        len = $urandom_range(2, 60);
        v   = ($urandom_range(0, 1) == 0) ? 32'h0 : $urandom();
        comp.push_back({1'b1, 15'b0, 16'(len)});
        comp.push_back(v);
        for (int i = 0; i < len; i++) orig.push_back(v);
      end else begin
        len = $urandom_range(1, 12);
        comp.push_back({1'b0, 15'b0, 16'(len)});
        for (int i = 0; i < len; i++) begin
          v = $urandom();
          comp.push_back(v);
          orig.push_back(v);
        end
      end
    end
  endfunction

  task automatic run_direct(input int n, input real f_mhz, output realtime dur);
    logic [WORD_W-1:0] w [$];
    real mbps;
    make_words(n, w);
    preload(w, MODE_DIRECT);
    reconfigure(w, dur);
    check(last_cyc - first_cyc == longint'(n - 1),
          $sformatf("burst of %0d words took %0d CLK_2 cycles", n, last_cyc - first_cyc + 1));
    if (last_cyc - first_cyc == longint'(n - 1)) n_gapfree++;
    mbps = 4.0 * real'(n) * 1000.0 / real'(last_t - first_t + 1000.0 / f_mhz);
    check(mbps > 4.0 * f_mhz * 0.995 && mbps < 4.0 * f_mhz * 1.005,
          $sformatf("burst bandwidth %f MB/s at %f MHz", mbps, f_mhz));
    $display("direct: %0d words at %0.1f MHz: reconfiguration %0.2f us, burst %0.1f MB/s",
             n, f_mhz, dur / 1000.0, mbps);
    n_direct++;
  endtask

  initial begin
    realtime d100, d200, dtmp;
    logic [WORD_W-1:0] orig [$], comp [$], none [$];
    repeat (3) @(posedge clk_drp);
    rst_n = 1'b1;
    wait (&dcm_locked);
    repeat (10) @(posedge clk_1);
    check(!finish && !busy, "reset state");

    // Direct mode at 100 MHz, then 200 MHz: time halves
    run_direct(2000, 100.0, d100);
    set_clock(CLK_RECONF, 4, 2, 1'b1);
    run_direct(2000, 200.0, d200);
    check(d200 < 0.55 * d100 && d200 > 0.45 * d100, "doubling CLK_2 halves the time");

    // Zero-size header
    preload(none, MODE_DIRECT);
    reconfigure(none, dtmp);
    n_zero++;

    // Compressed mode: CLK_2 250 MHz, CLK_3 125 MHz
    set_clock(CLK_RECONF, 5, 2, 1'b1);
    set_clock(CLK_DECOMP, 5, 4, 1'b1);
    make_compressed(5000, orig, comp);
    preload(comp, MODE_COMPRESSED);
    reconfigure(orig, dtmp);
    $display("compressed: %0d words stored, %0d words to ICAP, %0.2f us",
             comp.size(), orig.size(), dtmp / 1000.0);
    n_comp++;

    // Out-of-range request (M = 51 for 255 MHz is beyond the DCM)
    set_clock(CLK_RECONF, 51, 20, 1'b0);

    // Full-size workload: 247 KiB bitstream at 362.5 MHz
    set_clock(CLK_RECONF, 29, 8, 1'b1);
    run_direct(247 * 256, 362.5, dtmp);

    // Compressed again after a direct run
    set_clock(CLK_RECONF, 3, 2, 1'b1);
    make_compressed(800, orig, comp);
    preload(comp, MODE_COMPRESSED);
    reconfigure(orig, dtmp);
    n_comp++;

    check(n_direct >= 1, "mechanism: direct mode");
    check(n_comp >= 1, "mechanism: compressed mode");
    check(n_zero >= 1, "mechanism: zero-size header");
    check(n_retune >= 1, "mechanism: clock retuning");
    check(n_reject >= 1, "mechanism: rejected clock request");
    check(n_backpressure >= 1, "mechanism: decompressor back-pressure");
    check(n_gapfree >= 1, "mechanism: gap-free burst");
    $display("mechanisms: direct=%0d compressed=%0d zero=%0d retune=%0d reject=%0d backpressure=%0d gapfree=%0d",
             n_direct, n_comp, n_zero, n_retune, n_reject, n_backpressure, n_gapfree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(50ms);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
