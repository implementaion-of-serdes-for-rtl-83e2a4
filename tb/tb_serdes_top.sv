// tb_serdes_top: end-to-end test of the SerDes at its default parameters.
// The testbench plays the protocol device on the transmit side (a new 8B/10B character on every
// rising TBC edge, TBC derived from the SerDes bit clock by ten) and the far-end transmitter on
// SI (its own bit timing, slightly faster or slower than the local clock). Phases:
//  1. EWRAP loopback, 1.25 Gb/s from a 125 MHz REFCLK (x10), TXRATE low (falling-edge latch),
//     RBC at 1/10: R must repeat the T characters in order and SO must stay HIGH.
//  2. Line mode at 1.25 Gb/s: SI from the far end at +0.25 % then -0.25 % bit rate, RBC at
//     1/20; R must repeat the far-end characters with no slip, SO must carry T (T0 first),
//     RX_LOS must drop; then a run of 8 equal bits and a stretch without K28.5 raise RX_LOS and
//     clean data clears it again. With ENCDET low a one-bit slip on the line must stay
//     uncorrected (no COMDET, no realignment); with ENCDET high again the next K28.5 must
//     realign R.
//  3. EWRAP loopback at 2.5 Gb/s from a 62.5 MHz REFCLK (x40), TXRATE and RXRATE high.
// Each mechanism (comma realignment, COMDET, both phase step directions, run-length error,
// RX_LOS set and clear, both TBC latch edges, both RBC rates, loopback and line mode) is
// counted and must have happened at least once. Time unit 1 ns.
module tb_serdes_top;
  logic rst_n = 1'b0, refclk = 1'b0, refrate = 1'b1, txrate = 1'b0, tbc = 1'b0, ewrap = 1'b1;
  logic [0:9] t = 10'b0011111010;
  logic si = 1'b0, si_amp_ok = 1'b1, rxrate = 1'b0, rbcsync = 1'b1, encdet = 1'b1;
  logic so, comdet, rbc0, rbc1, rx_los, bit_clk, os_clk, pll_locked;
  logic [0:9] r;
  logic stat_word_vld, stat_realign, stat_step_later, stat_step_earlier, stat_rll_err;
  real  ref_half = 4.0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_realign = 0, n_comdet = 0, n_later = 0, n_earlier = 0, n_rll = 0;
  int n_los_set = 0, n_los_clr = 0, n_tx_rise = 0, n_tx_fall = 0, n_rbc10 = 0, n_rbc20 = 0;
  int n_loop_ok = 0, n_line_ok = 0, n_encdet_off = 0, n_encdet_on = 0;

  serdes_top dut (
    .rst_n, .refclk, .refrate, .txrate, .tbc, .t, .ewrap, .so, .si, .si_amp_ok, .rxrate,
    .rbcsync, .encdet, .r, .comdet, .rbc0, .rbc1, .rx_los, .bit_clk, .os_clk, .pll_locked,
    .stat_word_vld, .stat_realign, .stat_step_later, .stat_step_earlier, .stat_rll_err
  );

  always #(ref_half) refclk = ~refclk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a few valid 8B/10B characters (first bit on the left): K28.5-, K28.5+, D21.5, D10.2,
  // D0.0-, D0.0+; no run longer than five bits across any pair of them
  localparam logic [0:9] CHARS [6] = '{10'b0011111010, 10'b1100000101, 10'b1010101010,
                                       10'b0101010101, 10'b1001110100, 10'b0110001011};
  function automatic logic [0:9] next_char(int i);
    return (i % 8 == 0) ? CHARS[(i / 8) % 2] : CHARS[2 + $urandom % 4];
  endfunction

  // ---------------- transmit side: protocol device
  int bitcnt = 0, tx_i = 0;
  logic [0:9] sent_t [$];
  always @(posedge bit_clk) begin
    bitcnt <= (bitcnt == 9) ? 0 : bitcnt + 1;
    tbc    <= (bitcnt < 5);
  end
  always @(posedge tbc) begin
    t <= next_char(tx_i);
    tx_i <= tx_i + 1;
  end
  // the character the SerDes takes is the one present at the latching edge
  always @(posedge tbc) if (rst_n && txrate)  begin sent_t.push_back(t); n_tx_rise++; end
  always @(negedge tbc) if (rst_n && !txrate) begin sent_t.push_back(t); n_tx_fall++; end

  // SO captured on the falling bit clock edge (line mode only)
  logic so_bits [$];
  bit   cap_so = 0;
  always @(negedge bit_clk) if (cap_so) so_bits.push_back(so);

  // ---------------- far-end transmitter on SI
  logic [0:9] sent_si [$];
  bit   far_on = 0;
  bit   far_slip = 0;   // drop the last bit of the next character (a bit slip on the line)
  real  far_bit = 0.8;

  initial begin
    int i;
    i = 0;
    forever begin
      if (far_on) begin
        logic [0:9] c;
        c = next_char(i);
        i++;
        sent_si.push_back(c);
        for (int b = 0; b < (far_slip ? 9 : 10); b++) begin
          si = c[b];
          #(far_bit);
        end
        far_slip = 0;
      end else #1;
    end
  end

  // ---------------- receive side
  logic [0:9] rec [$];
  always @(posedge os_clk) begin
    if (rst_n) begin
      if (stat_word_vld) rec.push_back(r);
      if (stat_realign) n_realign++;
      if (stat_word_vld && comdet) n_comdet++;
      if (stat_step_later) n_later++;
      if (stat_step_earlier) n_earlier++;
      if (stat_rll_err) n_rll++;
    end
  end
  logic los_q = 1'b1;
  always @(posedge os_clk) begin
    if (rst_n && rx_los && !los_q) n_los_set++;
    if (rst_n && !rx_los && los_q) n_los_clr++;
    los_q <= rx_los;
  end

  // RBC0 rate: rising edges counted over a number of received characters
  int rbc_rises = 0;
  logic rbc0_q = 1'b0;
  always @(posedge os_clk) begin
    if (rbc0 && !rbc0_q) rbc_rises++;
    rbc0_q <= rbc0;
    if (rst_n && rbc1 != ~rbc0) begin checks++; failures++; $display("RBC1 is not ~RBC0"); end
  end

  // received characters must equal the sent ones from some offset on, with nothing lost
  task automatic match_words(ref logic [0:9] got [$], ref logic [0:9] exp [$], input int skip,
                             input string what, output bit ok_all);
    int off;
    bit found;
    found = 0;
    ok_all = 0;
    for (off = 0; off < exp.size() - 20 && !found; off++) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < 8; j++) if (got[skip + j] != exp[off + j]) ok = 0;
      if (ok) begin
        int bad;
        found = 1;
        bad = 0;
        for (int j = 0; skip + j < got.size() && off + j < exp.size(); j++) begin
          checks++;
          if (got[skip + j] != exp[off + j]) begin
            failures++; bad++;
            if (bad < 5) $display("%s: character %0d is %b, expected %b", what, j, got[skip + j], exp[off + j]);
          end
        end
        ok_all = (bad == 0);
        $display("%s: %0d characters compared", what, got.size() - skip);
      end
    end
    checks++;
    if (!found) begin failures++; $display("%s: received characters never matched", what); end
  endtask

  task automatic restart(input logic rr, input logic tr, input logic xr, input logic ew);
    rst_n = 1'b0;
    refrate = rr; txrate = tr; rxrate = xr; ewrap = ew;
    ref_half = rr ? 4.0 : 8.0;
    repeat (4) @(posedge refclk);
    repeat (20) @(posedge bit_clk);
    rst_n = 1'b1;
    rec.delete();
    sent_t.delete();
  endtask

  initial begin
    bit ok;
    int so_high, nw0;
    wait (pll_locked);
    // ---------------- phase 1: loopback, 1.25 Gb/s, TXRATE low, RBC 1/10
    rbcsync = 1'b1;
    restart(1'b1, 1'b0, 1'b0, 1'b1);
    so_high = 0;
    repeat (400) begin
      @(posedge bit_clk);
      if (so) so_high++;
    end
    rbc_rises = 0;
    nw0 = rec.size();
    repeat (600 * 10) @(posedge bit_clk);
    begin
      int nw;
      nw = rec.size() - nw0;
      checks++;
      if (rbc_rises < nw - 2 || rbc_rises > nw + 2) begin
        failures++; $display("RBC 1/10: %0d rising edges for %0d characters", rbc_rises, nw);
      end else n_rbc10++;
    end
    checks++;
    if (so_high != 400) begin failures++; $display("SO not HIGH during EWRAP"); end
    match_words(rec, sent_t, 4, "loopback 1.25G", ok);
    if (ok) n_loop_ok++;

    // ---------------- phase 2: line mode, far end slightly fast then slow, RBC 1/20
    rbcsync = 1'b0;
    restart(1'b1, 1'b0, 1'b0, 1'b0);
    so_bits.delete();
    cap_so = 1;
    far_bit = 0.798;
    far_on = 1;
    repeat (50 * 10) @(posedge bit_clk);
    rbc_rises = 0;
    nw0 = rec.size();
    repeat (250 * 10) @(posedge bit_clk);
    far_bit = 0.802;
    repeat (300 * 10) @(posedge bit_clk);
    cap_so = 0;
    begin
      int nw;
      nw = rec.size() - nw0;
      checks++;
      if (rbc_rises < nw / 2 - 2 || rbc_rises > nw / 2 + 2) begin
        failures++; $display("RBC 1/20: %0d rising edges for %0d characters", rbc_rises, nw);
      end else n_rbc20++;
    end
    checks++;
    if (rx_los) begin failures++; $display("RX_LOS high on a clean line"); end
    match_words(rec, sent_si, 4, "line 1.25G", ok);
    if (ok) n_line_ok++;
    // SO must carry the transmitted characters, T0 first
    begin
      logic [0:9] so_w [$];
      int start;
      start = -1;
      for (int k = 0; k + 10 < so_bits.size() && start < 0; k++) begin
        logic [0:9] w;
        for (int b = 0; b < 10; b++) w[b] = so_bits[k + b];
        if (w == 10'b0011111010 || w == 10'b1100000101) start = k;
      end
      for (int k = start; start >= 0 && k + 10 <= so_bits.size(); k += 10) begin
        logic [0:9] w;
        for (int b = 0; b < 10; b++) w[b] = so_bits[k + b];
        so_w.push_back(w);
      end
      checks++;
      if (start < 0) begin failures++; $display("no K28.5 on SO"); end
      else match_words(so_w, sent_t, 0, "SO 1.25G", ok);
    end
    // run-length violation on the line: eight zeros in place of a character
    far_on = 0;
    #20;
    si = 1'b0;
    #(8 * 0.8);
    far_on = 1;
    repeat (400 * 10) @(posedge bit_clk);
    checks++;
    if (n_rll == 0) begin failures++; $display("run-length violation not flagged"); end
    if (rx_los) begin checks++; failures++; $display("RX_LOS did not clear after the violation"); end
    // amplitude loss
    si_amp_ok = 1'b0;
    repeat (20) @(posedge bit_clk);
    checks++;
    if (!rx_los) begin failures++; $display("RX_LOS low without amplitude"); end
    si_amp_ok = 1'b1;
    repeat (400 * 10) @(posedge bit_clk);
    checks++;
    if (rx_los) begin failures++; $display("RX_LOS did not clear after amplitude came back"); end

    // ENCDET low: a bit slip on the line is not corrected and no K28.5 shows on R
    encdet = 1'b0;
    far_slip = 1;
    repeat (20 * 10) @(posedge bit_clk);
    begin
      int c0, r0;
      c0 = n_comdet; r0 = n_realign;
      repeat (100 * 10) @(posedge bit_clk);
      checks++;
      if (n_comdet != c0 || n_realign != r0) begin
        failures++; $display("ENCDET low: %0d commas, %0d realignments", n_comdet - c0, n_realign - r0);
      end else n_encdet_off++;
      // ENCDET high again: the next comma realigns and R is right again
      encdet = 1'b1;
      repeat (30 * 10) @(posedge bit_clk);
      checks++;
      if (n_realign == r0) begin failures++; $display("no realignment after ENCDET went high"); end
      rec.delete();
      repeat (100 * 10) @(posedge bit_clk);
      match_words(rec, sent_si, 0, "after ENCDET realignment", ok);
      if (ok) n_encdet_on++;
    end
    far_on = 0;

    // ---------------- phase 3: loopback at 2.5 Gb/s from 62.5 MHz (x40), TXRATE/RXRATE high
    rbcsync = 1'b1;
    restart(1'b0, 1'b1, 1'b1, 1'b1);
    repeat (600 * 10) @(posedge bit_clk);
    match_words(rec, sent_t, 4, "loopback 2.5G", ok);
    if (ok) n_loop_ok++;

    // ---------------- every mechanism must have happened
    begin
      int cnt [16];
      string names [16];
      cnt = '{n_realign, n_comdet, n_later, n_earlier, n_rll, n_los_set, n_los_clr, n_tx_rise,
              n_tx_fall, n_rbc10, n_rbc20, n_loop_ok, n_line_ok, rec.size(), n_encdet_off,
              n_encdet_on};
      names = '{"comma realignment", "COMDET", "phase step later", "phase step earlier",
                "run-length error", "RX_LOS set", "RX_LOS clear", "TBC rising latch",
                "TBC falling latch", "RBC 1/10", "RBC 1/20", "loopback", "line mode",
                "characters at 2.5G", "slip kept, ENCDET low", "realigned, ENCDET high"};
      for (int k = 0; k < 16; k++) begin
        checks++;
        $display("%-20s %0d", names[k], cnt[k]);
        if (cnt[k] == 0) begin failures++; $display("mechanism never happened: %s", names[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
