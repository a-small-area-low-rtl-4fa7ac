// tb_cdr_jitter: jitter workload for the CDR. Ideal 2.5 GHz phases drive the loop; the
// PRBS data has every bit boundary moved by an independent, uniformly distributed random
// offset of up to +/-J/2 (peak-to-peak input jitter J = 0, 0.2, 0.4 and 0.6 UI). For each
// amplitude the retimed bits must satisfy the PRBS recurrence with no errors after
// acquisition, and the recovered clock's phase wander is measured as the span of
// interpolator positions visited (1 LSB = 25 ps). In the reference simulations of this
// architecture the output jitter stays at about 2 LSB up to 0.6 UI input jitter. This
// bench measures the full span visited over 20000 bits (rare excursions included) and
// requires at most 3 LSB up to 0.4 UI and at most 4 LSB at 0.6 UI. It also requires the
// retimed stream to keep toggling, so a stalled source or a stuck sampler cannot pass.
`timescale 1ps/1ps
module tb_cdr_jitter;
  logic rst_n = 1'b0;
  logic [3:0] ph = '0;
  logic din = 1'b0;
  logic rclk, rdata, lead_ov, lag_ov, lock;
  logic [3:0] pos;
  int checks = 0, failures = 0;

  cdr dut (.rst_n, .ph, .din, .rclk, .rdata, .lead_ov, .lag_ov, .lock, .pos);

  for (genvar k = 0; k < 4; k++) begin : g_ph
    initial begin
      #(100 * k);
      forever begin ph[k] = ~ph[k]; #200; end
    end
  end

  // Jittered data source: boundary k at 400*k + offset + u, u uniform in [-jpp/2, jpp/2].
  int jpp_ps = 0;
  initial begin
    logic [15:0] s;
    int u, wait_ps;
    s = 16'hB00B;
    #1000;
    u = 0;
    forever begin
      // u is this boundary's offset from its nominal time; wait from the previous one.
      wait_ps = 400 - u;
      u = (jpp_ps == 0) ? 0 : int'($urandom_range(0, jpp_ps)) - jpp_ps / 2;
      wait_ps += u;
      #(wait_ps);
      din = s[15];
      s = {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
    end
  end

  logic [15:0] hist;
  int nbits = 0, errs = 0, checked = 0, toggles = 0;
  bit checking = 0;
  int occ [16];
  always @(posedge rclk) begin
    if (rst_n) begin
      if (checking) begin
        if (nbits >= 16) begin
          checked++;
          if (rdata != (hist[15] ^ hist[14] ^ hist[12] ^ hist[3])) errs++;
        end
        if (rdata != hist[0]) toggles++;
        occ[pos]++;
      end
      hist = {hist[14:0], rdata};
      nbits++;
    end
  end

  // Smallest circular window of positions that holds every visit.
  function automatic int span_lsb();
    int best;
    best = 16;
    for (int start = 0; start < 16; start++) begin
      for (int w = 0; w < 16; w++) begin
        bit all_in;
        all_in = 1;
        for (int q = 0; q < 16; q++) begin
          int d;
          d = (q - start + 16) % 16;
          if (occ[q] > 0 && d > w) all_in = 0;
        end
        if (all_in) begin
          if (w < best) best = w;
          break;
        end
      end
    end
    return best;
  endfunction

  initial begin
    #3000;
    for (int a = 0; a <= 3; a++) begin
      int span, limit;
      jpp_ps = 80 * a;                   // 0, 0.2, 0.4, 0.6 UI
      rst_n = 1'b0;
      repeat (4) @(posedge rclk);
      rst_n = 1'b1;
      repeat (800) @(posedge rclk);      // acquisition
      foreach (occ[q]) occ[q] = 0;
      nbits = 0; errs = 0; checked = 0; toggles = 0; checking = 1;
      repeat (20000) @(posedge rclk);
      checking = 0;
      span = span_lsb();
      checks++;
      if (checked < 19000 || errs != 0) begin
        failures++;
        $display("FAIL jitter %0d ps: %0d bit errors in %0d", jpp_ps, errs, checked);
      end
      checks++;
      if (toggles < 8000) begin
        failures++;
        $display("FAIL jitter %0d ps: only %0d transitions in the retimed stream", jpp_ps, toggles);
      end
      limit = (a < 3) ? 3 : 4;
      checks++;
      if (span > limit) begin
        failures++;
        $display("FAIL jitter %0d ps: recovered phase spans %0d LSB", jpp_ps, span);
      end
      $display("input jitter %0d ps pk-pk: errors %0d of %0d, output wander %0d LSB (%0d ps)",
               jpp_ps, errs, checked, span, span * 25);
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
