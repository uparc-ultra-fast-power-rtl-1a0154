// uparc_workload_tb: the workloads of the reference measurements, run on UPaRC at its
// default size (256 KiB BRAM), with the same behavioural DCMs and decompressor
// stand-in as uparc_tb and the testbench acting as manager.
//
//   1. A 216.5 KiB uncompressed bitstream (55,424 words) at CLK_2 = 50, 100, 200 and
//      300 MHz. The start-to-finish time must be within 5% of the reference times
//      1.1 ms, 550 us, 270 us and 180 us, and must halve when the clock doubles.
//   2. Uncompressed bitstreams of 6, 12, 49, 81, 130, 156 and 247 KiB at 362.5 MHz
//      (M = 29, D = 8): every burst runs at one word per cycle, 1450 MB/s; the
//      start-to-finish bandwidth is printed for each size.
//   3. The largest compressed case: 992 KiB of configuration data (253,952 words)
//      stored as at most 65,535 compressed words, with CLK_2 = 253.8 MHz (33/13) and
//      the decompressor clock at 125 MHz (5/4). The data reaching ICAP must match,
//      and with a decompressor that never stalls the rate must approach its
//      2 words x 125 MHz = 1000 MB/s (the reference reaches 1008 MB/s at 126 MHz).
module uparc_workload_tb;
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

  decomp_model #(.STALL(1'b0)) u_dec (
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

  // Compressed image of n_out words in at most max_cmp words: literal blocks of 8
  // words followed by runs of 30 to 50 copies.
  function automatic void make_big_compressed(input int n_out, output logic [WORD_W-1:0] orig [$],
                                              output logic [WORD_W-1:0] comp [$]);
    orig.delete(); comp.delete();
    while (orig.size() < n_out) begin
      int len;
      logic [WORD_W-1:0] v;
      len = (n_out - orig.size() < 8) ? n_out - orig.size() : 8;
      comp.push_back({1'b0, 15'b0, 16'(len)});
      for (int i = 0; i < len; i++) begin
        v = $urandom();
        comp.push_back(v);
        orig.push_back(v);
      end
      if (orig.size() < n_out) begin
        len = $urandom_range(30, 50);
        if (len > n_out - orig.size()) len = n_out - orig.size();
        v = $urandom();
        comp.push_back({1'b1, 15'b0, 16'(len)});
        comp.push_back(v);
        for (int i = 0; i < len; i++) orig.push_back(v);
      end
    end
  endfunction

  initial begin
    realtime t_f [4];
    realtime dtmp;
    int       f_m [4] = '{2, 2, 4, 3};
    int       f_d [4] = '{4, 2, 2, 1};
    real      f_mhz [4] = '{50.0, 100.0, 200.0, 300.0};
    real      ref_us [4] = '{1100.0, 550.0, 270.0, 180.0};
    int       sizes_kb [7] = '{6, 12, 49, 81, 130, 156, 247};
    logic [WORD_W-1:0] orig [$], comp [$];
    repeat (3) @(posedge clk_drp);
    rst_n = 1'b1;
    wait (&dcm_locked);
    repeat (10) @(posedge clk_1);

    // 1. 216.5 KiB at four frequencies
    for (int k = 0; k < 4; k++) begin
      set_clock(CLK_RECONF, f_m[k], f_d[k], 1'b1);
      run_direct(55424, f_mhz[k], t_f[k]);
      check(t_f[k] / 1000.0 > ref_us[k] * 0.95 && t_f[k] / 1000.0 < ref_us[k] * 1.05,
            $sformatf("216.5 KiB at %0.0f MHz: %0.1f us, reference %0.0f us",
                      f_mhz[k], t_f[k] / 1000.0, ref_us[k]));
    end
    check(t_f[2] < 0.51 * t_f[1] && t_f[2] > 0.49 * t_f[1], "100 -> 200 MHz halves the time");

    // 2. Fig. 5 sizes at 362.5 MHz
    set_clock(CLK_RECONF, 29, 8, 1'b1);
    foreach (sizes_kb[k]) begin
      run_direct(sizes_kb[k] * 256, 362.5, dtmp);
      $display("  %0d KiB: start-to-finish bandwidth %0.1f MB/s",
               sizes_kb[k], real'(sizes_kb[k]) * 1024.0 * 1000.0 / dtmp);
    end

    // 3. 992 KiB compressed into the 256 KiB memory
    set_clock(CLK_RECONF, 33, 13, 1'b1);
    set_clock(CLK_DECOMP, 5, 4, 1'b1);
    make_big_compressed(992 * 256, orig, comp);
    check(comp.size() <= BRAM_WORDS - 1, $sformatf("compressed image %0d words fits", comp.size()));
    preload(comp, MODE_COMPRESSED);
    reconfigure(orig, dtmp);
    $display("compressed: %0d words stored, %0d words to ICAP in %0.1f us (%0.1f MB/s)",
             comp.size(), orig.size(), dtmp / 1000.0, 4.0 * real'(orig.size()) * 1000.0 / dtmp);
    check(4.0 * real'(orig.size()) * 1000.0 / dtmp > 950.0,
          "compressed mode limited only by the 2-word, 125 MHz decompressor (1000 MB/s)");
    n_comp++;
    check(n_comp == 1 && n_direct == 11 && n_gapfree == 11, "all workloads ran");
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
