// tb_confidence_counter: compares the one-hot token counter with an integer model
// (position -5..+5, overflow past either end, restart at 0). First six leads in a row from
// reset must give lead_ov exactly one clock after the sixth; then random lead/lag/hold
// streams with several biases check every output on every clock, including hold_ov.
// Last, an unbiased stream checks the mean time between overflows (the loop bandwidth).
`timescale 1ps/1ps
module tb_confidence_counter;
  localparam int HALF = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  trx_pkg::pd_dec_t dec = '0;
  logic lead_ov, lag_ov, hold_ov;
  int checks = 0, failures = 0;
  int n_lead_ov = 0, n_lag_ov = 0;

  confidence_counter #(.HALF(HALF)) dut (.clk, .rst_n, .dec, .lead_ov, .lag_ov, .hold_ov);

  always #200 clk = ~clk;

  int pos = 0;
  logic exp_lead_ov = 0, exp_lag_ov = 0;

  task automatic step(input trx_pkg::pd_dec_t d);
    dec = d;
    @(posedge clk);
    // model update at this edge
    exp_lead_ov = 0;
    exp_lag_ov  = 0;
    if (d.lead && !d.lag) begin
      if (pos == -(HALF - 1)) begin pos = 0; exp_lead_ov = 1; end else pos--;
    end else if (d.lag && !d.lead) begin
      if (pos == HALF - 1) begin pos = 0; exp_lag_ov = 1; end else pos++;
    end
    #1;
    checks++;
    if (lead_ov !== exp_lead_ov || lag_ov !== exp_lag_ov || hold_ov !== !(exp_lead_ov || exp_lag_ov)) begin
      failures++;
      if (failures < 10) $display("FAIL %0t lead_ov=%b lag_ov=%b exp %b %b", $time, lead_ov, lag_ov, exp_lead_ov, exp_lag_ov);
    end
    n_lead_ov += lead_ov;
    n_lag_ov  += lag_ov;
  endtask

  initial begin
    trx_pkg::pd_dec_t d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    // Six leads: overflow only after the sixth.
    for (int i = 0; i < 6; i++) begin
      step('{lead: 1'b1, lag: 1'b0, hold: 1'b0});
      checks++;
      if (lead_ov !== (i == 5)) begin failures++; $display("FAIL lead_ov after %0d leads", i + 1); end
    end
    // Random streams: lead-biased, balanced, lag-biased, with holds and idle patterns.
    for (int bias = 20; bias <= 80; bias += 30) begin
      for (int i = 0; i < 3000; i++) begin
        int r;
        r = $urandom_range(0, 99);
        if (r < 30)              d = '{lead: 1'b0, lag: 1'b0, hold: 1'b1};
        else if (r < 33)         d = '0;
        else if ($urandom_range(0, 99) < bias) d = '{lead: 1'b1, lag: 1'b0, hold: 1'b0};
        else                     d = '{lead: 1'b0, lag: 1'b1, hold: 1'b0};
        step(d);
      end
    end
    checks++;
    if (n_lead_ov == 0 || n_lag_ov == 0) begin failures++; $display("FAIL no overflow seen"); end
    // Loop bandwidth: with leads and lags equally likely the token does a symmetric random
    // walk that ends HALF places from the middle, on average HALF*HALF = 36 decisions.
    // At transition density 0.5 that is 72 bits of 400 ps, i.e. about 34.7 MHz.
    begin
      int n_ov, n_dec;
      real mean;
      n_ov = 0;
      for (n_dec = 0; n_dec < 72000; n_dec++) begin
        if ($urandom_range(0, 1) == 1) d = '{lead: 1'b1, lag: 1'b0, hold: 1'b0};
        else                           d = '{lead: 1'b0, lag: 1'b1, hold: 1'b0};
        step(d);
        n_ov += lead_ov + lag_ov;
      end
      mean = real'(n_dec) / real'(n_ov);
      checks++;
      if (mean < 33.0 || mean > 39.0) begin
        failures++;
        $display("FAIL mean decisions per overflow %f, expected about 36", mean);
      end
      $display("mean decisions per overflow %f -> bandwidth %f MHz", mean,
               1.0e6 / (mean * 2.0 * 400.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
