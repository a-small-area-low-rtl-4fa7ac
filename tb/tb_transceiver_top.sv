// tb_transceiver_top: end-to-end test of the transceiver at its default parameters.
// Every check relies on one property of the PRBS: any 2^16-1 sequence from the
// polynomial x^16+x^15+x^13+x^4+1 obeys b[n] = b[n-16]^b[n-15]^b[n-13]^b[n-4], whatever the
// seed or the word alignment. Received words (and the transmitted serial stream) are
// unpacked bit by bit and every bit after the first 16 must satisfy that recurrence.
// Phases:
//   1. LFSR mode: the transmitter's own PRBS goes through a delaying channel back into
//      the receiver; the CDR must lock and both the serial output and the deserialized
//      words must be valid PRBS.
//   2. Loop-back mode, 0 ppm: an external PRBS source (a bit-error-rate tester) drives the
//      receiver at the nominal 400 ps bit time with an arbitrary phase; the received words
//      and the transmitter output (the words sent back out) must be valid PRBS.
//   3. Loop-back mode, external source 5000 ppm slow (402 ps) and then 5000 ppm fast
//      (398 ps): the CDR must keep stepping its phase, wrapping through the bit time, and
//      the received words must stay error free once it has caught the data.
// It also checks the deserializer word rate (one word per 10 recovered clocks) and counts
// how often each mechanism happened: lead_ov, lag_ov, lock, phase wrap in both
// directions, coarse phase change, each transmit source.
`timescale 1ps/1ps
module tb_transceiver_top;
  localparam int WORDS_PER_PHASE = 1500;
  localparam int SKIP_WORDS      = 150;   // words ignored after a phase change

  logic ref_clk = 1'b0, pll_rst_n = 1'b0, rst_n = 1'b0, loopback = 1'b0;
  real  tx_vop, tx_von, rx_vip, rx_vin, chan_p, chan_n, ext_p, ext_n;
  logic pll_locked, tx_clk, tx_bit, rx_clk, rx_bit, rx_word_valid, cdr_lock;
  logic cdr_lead_ov, cdr_lag_ov;
  logic [9:0] rx_word;
  logic [3:0] cdr_pos;

  transceiver_top dut (
    .ref_clk, .pll_rst_n, .rst_n, .loopback,
    .tx_vop_mv(tx_vop), .tx_von_mv(tx_von), .rx_vip_mv(rx_vip), .rx_vin_mv(rx_vin),
    .pll_locked, .tx_clk, .tx_bit, .rx_clk, .rx_bit, .rx_word, .rx_word_valid,
    .cdr_lock, .cdr_lead_ov, .cdr_lag_ov, .cdr_pos
  );

  always #5000 ref_clk = ~ref_clk;   // 100 MHz

  // Channel: 310 ps of flight time (kept below one bit time). External source selected by use_ext.
  logic use_ext = 1'b0;
  always @(tx_vop or tx_von) begin
    chan_p <= #310 tx_vop;
    chan_n <= #310 tx_von;
  end
  always_comb begin
    rx_vip = use_ext ? ext_p : chan_p;
    rx_vin = use_ext ? ext_n : chan_n;
  end

  // External PRBS source with its own bit time.
  int   ui_ps = 400;
  logic ext_run = 1'b0;
  initial begin
    logic [15:0] s;
    s = 16'h1D0F;
    ext_p = 1000.0; ext_n = 1400.0;
    forever begin
      if (ext_run) begin
        ext_p = s[15] ? 1400.0 : 1000.0;
        ext_n = s[15] ? 1000.0 : 1400.0;
        s = {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
        #(ui_ps);
      end else #100;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // PRBS recurrence checker on deserialized words.
  logic [15:0] rx_hist;
  int rx_nbits = 0, rx_words = 0, rx_word_err = 0, rx_skip = 0;
  bit rx_checking = 0;
  always @(posedge rx_clk) begin
    if (rst_n && rx_word_valid) begin
      bit ok;
      ok = 1;
      rx_words++;
      for (int i = 0; i < 10; i++) begin
        if (rx_nbits >= 16 && rx_word[i] != (rx_hist[15] ^ rx_hist[14] ^ rx_hist[12] ^ rx_hist[3]))
          ok = 0;
        rx_hist = {rx_hist[14:0], rx_word[i]};
        rx_nbits++;
      end
      if (rx_skip > 0) rx_skip--;
      else if (rx_checking) begin
        check(ok, "received word breaks PRBS recurrence");
        if (!ok) rx_word_err++;
      end
    end
  end

  // PRBS recurrence checker on the transmitted serial stream.
  logic [15:0] tx_hist;
  int tx_nbits = 0, tx_err = 0, tx_checked = 0;
  bit tx_checking = 0;
  always @(posedge tx_clk) begin
    if (rst_n) begin
      if (tx_checking && tx_nbits >= 40) begin
        tx_checked++;
        if (tx_bit != (tx_hist[15] ^ tx_hist[14] ^ tx_hist[12] ^ tx_hist[3])) tx_err++;
      end
      tx_hist = {tx_hist[14:0], tx_bit};
      tx_nbits++;
    end
  end

  // Word rate: one rx_word_valid every 10 recovered clocks.
  int since_word = -1, rate_err = 0, rate_checks = 0;
  always @(posedge rx_clk) begin
    if (rst_n) begin
      if (rx_word_valid) begin
        if (since_word >= 0) begin
          rate_checks++;
          if (since_word != 9) rate_err++;
        end
        since_word = 0;
      end else if (since_word >= 0) since_word++;
    end
  end

  // Mechanism counters.
  int n_lead_ov = 0, n_lag_ov = 0, n_lock = 0, n_wrap_up = 0, n_wrap_dn = 0, n_coarse = 0;
  int n_mode_lfsr = 0, n_mode_loop = 0;
  logic [3:0] pos_prev = '0;
  logic lock_prev = 1'b0;
  always @(posedge rx_clk) begin
    if (rst_n) begin
      if (cdr_lead_ov) n_lead_ov++;
      if (cdr_lag_ov)  n_lag_ov++;
      if (cdr_lock && !lock_prev) n_lock++;
      if (pos_prev == 4'd15 && cdr_pos == 4'd0) n_wrap_up++;
      if (pos_prev == 4'd0 && cdr_pos == 4'd15) n_wrap_dn++;
      if (pos_prev[3:2] != cdr_pos[3:2]) n_coarse++;
      pos_prev  = cdr_pos;
      lock_prev = cdr_lock;
    end
  end

  task automatic wait_words(input int n);
    int target;
    target = rx_words + n;
    while (rx_words < target) @(posedge rx_clk);
  endtask

  task automatic restart_rx_check();
    rx_nbits = 0;
    rx_skip  = SKIP_WORDS;
  endtask

  initial begin
    int wrap_before;
    repeat (3) @(posedge ref_clk);
    pll_rst_n = 1'b1;
    wait (pll_locked);
    repeat (20) @(posedge tx_clk);
    @(posedge tx_clk) rst_n <= 1'b1;

    // 1. LFSR mode through the channel.
    n_mode_lfsr++;
    restart_rx_check();
    rx_checking = 1;
    tx_checking = 1;
    wait_words(WORDS_PER_PHASE);
    check(cdr_lock || n_lock > 0, "CDR never reported lock in LFSR mode");
    check(tx_checked > 1000 && tx_err == 0, "transmitted stream is not PRBS in LFSR mode");
    $display("LFSR mode: rx words=%0d bad=%0d tx bits=%0d bad=%0d lead_ov=%0d lag_ov=%0d",
             rx_words, rx_word_err, tx_checked, tx_err, n_lead_ov, n_lag_ov);

    // 2. Loop-back, external source at 0 ppm.
    tx_checking = 0;
    ext_run  = 1'b1;
    use_ext  = 1'b1;
    loopback = 1'b1;
    n_mode_loop++;
    restart_rx_check();
    wait_words(SKIP_WORDS);
    tx_nbits = 0; tx_err = 0; tx_checked = 0;
    tx_checking = 1;
    wait_words(WORDS_PER_PHASE);
    check(tx_checked > 1000 && tx_err == 0, "loop-back output is not PRBS at 0 ppm");
    $display("Loop-back 0 ppm: rx bad=%0d tx bits=%0d bad=%0d", rx_word_err, tx_checked, tx_err);
    tx_checking = 0;

    // 3. Loop-back with +/-5000 ppm offset.
    ui_ps = 402;
    restart_rx_check();
    wrap_before = n_wrap_up;
    wait_words(2 * WORDS_PER_PHASE);
    check(n_wrap_up > wrap_before, "no upward phase wrap with a slow data source");
    $display("+5000 ppm: rx bad=%0d wraps up=%0d", rx_word_err, n_wrap_up - wrap_before);
    ui_ps = 398;
    restart_rx_check();
    wrap_before = n_wrap_dn;
    wait_words(2 * WORDS_PER_PHASE);
    check(n_wrap_dn > wrap_before, "no downward phase wrap with a fast data source");
    $display("-5000 ppm: rx bad=%0d wraps down=%0d", rx_word_err, n_wrap_dn - wrap_before);

    // Rate and mechanism coverage.
    check(rate_checks > 1000 && rate_err == 0, "deserializer word rate is not one per 10 bits");
    check(n_lead_ov > 0, "lead_ov never happened");
    check(n_lag_ov > 0, "lag_ov never happened");
    check(n_lock > 0, "lock never happened");
    check(n_coarse > 0, "coarse phase never changed");
    check(n_mode_lfsr > 0 && n_mode_loop > 0, "a transmit source was never used");
    $display("mechanisms: lead_ov=%0d lag_ov=%0d lock=%0d wrap_up=%0d wrap_dn=%0d coarse=%0d lfsr=%0d loop=%0d",
             n_lead_ov, n_lag_ov, n_lock, n_wrap_up, n_wrap_dn, n_coarse, n_mode_lfsr, n_mode_loop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: far beyond the ~30 us the test needs.
  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
