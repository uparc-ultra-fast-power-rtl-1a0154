// urec_tb: self-checking testbench for the UReC reconfiguration controller.
//
// A behavioural one-cycle-latency memory stands in for BRAM port B and an
// identity "decompressor" (same clock, random stalls on both sides, beats of one or
// two words) closes the compressed path. Checks: the header decode, the order and
// value of every ICAP word, that a direct-mode burst writes ICAP on consecutive
// cycles, the start-to-finish cycle count (N+2 in direct mode), zero-size headers,
// the size clamp, that EN stays high from start through the last read (header plus
// N words), that a start during a transfer is ignored, and the compressed stream with
// its last marker.
module urec_tb;
  import uparc_pkg::*;

  localparam int unsigned DEPTH = 1024;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start = 1'b0;
  logic              finish, busy, size_err;
  logic              bram_en;
  logic [AW-1:0]     bram_addr;
  logic [WORD_W-1:0] bram_dout;
  logic              icap_ce_n, icap_write_n;
  logic [WORD_W-1:0] icap_i;
  logic              cmp_valid, cmp_last, cmp_ready;
  logic [WORD_W-1:0] cmp_data;
  logic              dec_valid, dec_last, dec_ready;
  logic [DEC_W-1:0]  dec_data;
  logic [1:0]        dec_keep;

  urec #(.DEPTH(DEPTH)) dut (.*);

  // BRAM port B model
  logic [WORD_W-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (bram_en) bram_dout <= mem[bram_addr];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Monitor
  int unsigned cyc = 0;
  logic [WORD_W-1:0] got [$];
  int unsigned       got_cyc [$];
  logic [WORD_W-1:0] cmp_got [$];
  bit                cmp_last_seen;
  int unsigned       cmp_last_idx;
  int unsigned       fin_cyc;
  bit                fin_seen;
  logic              fin_q = 1'b0;
  int unsigned       en_after_fin;
  int unsigned       en_cycles;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!icap_ce_n && !icap_write_n) begin
      got.push_back(icap_i);
      got_cyc.push_back(cyc);
    end
    fin_q <= finish;
    if (finish && !fin_q && !fin_seen) begin
      fin_seen = 1'b1;
      fin_cyc  = cyc;
    end
    if (fin_seen && bram_en) en_after_fin++;
    if (!fin_seen && bram_en) en_cycles++;
  end

  // Identity decompressor with random stalls
  logic [WORD_W-1:0] dq [$];
  bit                dq_last_in;
  bit                stall_en = 1'b0;

  always @(posedge clk) begin
    if (cmp_valid && cmp_ready) begin
      cmp_got.push_back(cmp_data);
      dq.push_back(cmp_data);
      if (cmp_last) begin
        dq_last_in    = 1'b1;
        cmp_last_seen = 1'b1;
        cmp_last_idx  = cmp_got.size();
      end
    end
    if (dec_valid && dec_ready) begin
      void'(dq.pop_front());
      if (dec_keep == 2'b11) void'(dq.pop_front());
    end
  end

  always @(negedge clk) begin
    cmp_ready <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;
    dec_valid <= 1'b0;
    dec_keep  <= 2'b00;
    dec_last  <= 1'b0;
    dec_data  <= '0;
    if (dq.size() > 0 && (!stall_en || $urandom_range(0, 2) != 0)) begin
      if (dq.size() >= 2 && $urandom_range(0, 3) != 0) begin
        dec_valid <= 1'b1;
        dec_keep  <= 2'b11;
        dec_data  <= {dq[1], dq[0]};
        dec_last  <= dq_last_in && dq.size() == 2;
      end else if (dq.size() >= 2 || dq_last_in) begin
        dec_valid <= 1'b1;
        if ($urandom_range(0, 1) == 0) begin
          dec_keep <= 2'b01;
          dec_data <= {32'h0, dq[0]};
        end else begin
          dec_keep <= 2'b10;
          dec_data <= {dq[0], 32'h0};
        end
        dec_last <= dq_last_in && dq.size() == 1;
      end
    end
  end

  task automatic run(input int unsigned n, input bit comp, input bit stalls,
                     input bit restart = 1'b0);
    int unsigned start_cyc, nexp;
    bit gap_free;
    got.delete(); got_cyc.delete(); cmp_got.delete(); dq.delete();
    dq_last_in = 1'b0; cmp_last_seen = 1'b0; fin_seen = 1'b0; en_after_fin = 0;
    en_cycles = 0;
    stall_en = stalls;
    mem[0] = {n[30:0], comp};
    for (int i = 1; i < DEPTH; i++) mem[i] = $urandom();
    nexp = (n > DEPTH - 1) ? DEPTH - 1 : n;
    @(negedge clk) start = 1'b1;
    @(posedge clk) start_cyc = cyc;       // edge that samples start
    @(negedge clk) start = 1'b0;
    if (restart) begin                    // a second start in mid-transfer is ignored
      repeat (n / 2) @(negedge clk);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
    end
    fork
      wait (fin_seen);
      repeat (20 * DEPTH + 100) @(posedge clk);
    join_any
    disable fork;
    repeat (3) @(posedge clk);
    check(fin_seen, $sformatf("finish seen n=%0d comp=%0d", n, comp));
    check(got.size() == nexp, $sformatf("ICAP word count %0d expected %0d", got.size(), nexp));
    for (int i = 0; i < got.size() && i < nexp; i++)
      if (got[i] != mem[i+1]) begin
        check(1'b0, $sformatf("word %0d: %h expected %h", i, got[i], mem[i+1]));
        break;
      end
    check(size_err == (n > DEPTH - 1), "size_err flag");
    check(en_after_fin == 0, "BRAM disabled after finish");
    check(!busy && icap_ce_n, "idle after finish");
    if (!comp) begin
      gap_free = 1'b1;
      for (int i = 1; i < got_cyc.size(); i++) if (got_cyc[i] != got_cyc[i-1] + 1) gap_free = 1'b0;
      check(gap_free, "direct burst: one ICAP word per cycle");
      check(en_cycles == nexp + 1,
            $sformatf("EN high for %0d cycles, expected header + %0d words", en_cycles, nexp));
      check(fin_cyc - start_cyc == nexp + 3,
            $sformatf("start-to-finish %0d cycles, expected %0d", fin_cyc - start_cyc, nexp + 3));
      if (nexp > 0) check(got_cyc[0] - start_cyc == 3, "first ICAP write latency");
    end else begin
      check(cmp_got.size() == nexp, "compressed word count");
      if (nexp > 0) check(cmp_last_seen && cmp_last_idx == nexp, "cmp_last on final word");
    end
  endtask

  initial begin
    cmp_ready = 1'b1; dec_valid = 1'b0; dec_keep = '0; dec_last = 1'b0; dec_data = '0;
    mem[0] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(!finish && !busy && !bram_en && icap_ce_n, "reset state");
    run(1,   1'b0, 1'b0);
    run(5,   1'b0, 1'b0);
    run(300, 1'b0, 1'b0);
    run(0,   1'b0, 1'b0);
    run(DEPTH + 77, 1'b0, 1'b0);     // clamped to DEPTH-1
    run(1,   1'b1, 1'b0);
    run(2,   1'b1, 1'b0);
    run(97,  1'b1, 1'b0);
    run(250, 1'b1, 1'b1);
    run(0,   1'b1, 1'b1);
    run(40,  1'b0, 1'b0);            // back to direct mode after compressed runs
    run(120, 1'b0, 1'b0, 1'b1);      // start while busy
    run(120, 1'b1, 1'b1, 1'b1);
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
