// tb_cdr: closed-loop test of the clock and data recovery. Ideal 2.5 GHz phases feed the
// loop; a PRBS source drives the data input with a chosen bit time; a one-time
// phase step of the data (170 ps in the second 0 ppm case) is applied while reset is held.
// At 0 ppm the CDR must report lock; the retimed bits must satisfy the PRBS
// recurrence b[n] = b[n-16]^b[n-15]^b[n-13]^b[n-4] after the acquisition time, and at
// 0 ppm the rising (sampling) edge must settle within 75 ps of the bit centre, i.e. within
// a few 25 ps steps, and its peak-to-peak wander must stay within one 25 ps step (the
// phase only toggles between two neighbouring settings). With +/-5000 ppm (402 / 398 ps
// bit time) the phase must wrap around the bit time in the matching direction without
// bit errors; the sampling-edge wander under offset is printed but not bounded.
`timescale 1ps/1ps
module tb_cdr;
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

  // Data source.
  int ui_ps = 400, step_ps = 0;
  time t_edge;           // time of the latest bit boundary
  initial begin
    logic [15:0] s;
    s = 16'h5A5A;
    #1;
    forever begin
      din = s[15];
      t_edge = $time;
      s = {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
      #(ui_ps + step_ps);
      step_ps = 0;              // a one-time phase step of the data
    end
  end

  // Recurrence check on the retimed bits.
  logic [15:0] hist;
  int nbits = 0, errs = 0, checked = 0;
  bit checking = 0;
  always @(posedge rclk) begin
    if (rst_n) begin
      if (checking && nbits >= 16) begin
        checked++;
        if (rdata != (hist[15] ^ hist[14] ^ hist[12] ^ hist[3])) errs++;
      end
      hist = {hist[14:0], rdata};
      nbits++;
    end
  end

  int wraps_up = 0, wraps_dn = 0;
  logic [3:0] pos_prev = '0;
  always @(posedge rclk) begin
    if (rst_n) begin
      if (pos_prev == 15 && pos == 0) wraps_up++;
      if (pos_prev == 0 && pos == 15) wraps_dn++;
      pos_prev = pos;
    end
  end

  task automatic run_case(input int ui, input int start, input int expect_wrap);
    int offs, worst, omin, omax;
    ui_ps = ui;
    step_ps = start;
    rst_n = 1'b0;
    repeat (4) @(posedge rclk);
    rst_n = 1'b1;
    wraps_up = 0; wraps_dn = 0;
    repeat (600) @(posedge rclk);          // acquisition
    // Lock means the phase toggles between neighbours; under a steady frequency offset
    // every move goes the same way, so lock is only expected at 0 ppm.
    if (ui == 400) begin
      checks++;
      if (!lock) begin failures++; $display("FAIL ui=%0d start=%0d: no lock", ui, start); end
    end
    nbits = 0; errs = 0; checked = 0; checking = 1;
    worst = 0; omin = ui; omax = -ui;
    for (int i = 0; i < 4000; i++) begin
      @(posedge rclk);
      // signed distance of the sampling edge from the middle of the current bit
      offs = int'($time - t_edge) - ui / 2;
      if (offs < omin) omin = offs;
      if (offs > omax) omax = offs;
      if (offs < 0) offs = -offs;
      if (offs > worst) worst = offs;
    end
    checking = 0;
    checks++;
    if (checked < 3900 || errs != 0) begin
      failures++;
      $display("FAIL ui=%0d start=%0d: %0d bit errors in %0d", ui, start, errs, checked);
    end
    if (ui == 400) begin
      checks++;
      if (worst > 75) begin failures++; $display("FAIL sampling edge %0d ps off centre", worst); end
      // locked: the phase only toggles between two neighbouring settings (1 LSB)
      checks++;
      if (omax - omin > 25) begin
        failures++;
        $display("FAIL ui=%0d: locked sampling edge wanders %0d ps", ui, omax - omin);
      end
    end
    if (expect_wrap != 0) begin
      checks++;
      if ((expect_wrap > 0 && wraps_up == 0) || (expect_wrap < 0 && wraps_dn == 0)) begin
        failures++;
        $display("FAIL ui=%0d: no phase wrap (up %0d down %0d)", ui, wraps_up, wraps_dn);
      end
    end
    $display("case ui=%0d: errors=%0d of %0d, wraps up=%0d down=%0d, worst offset=%0d, pk-pk %0d ps",
             ui, errs, checked, wraps_up, wraps_dn, worst, omax - omin);
  endtask

  initial begin
    #3000;
    run_case(400, 0, 0);
    run_case(402, 0, 1);
    run_case(398, 0, -1);
    run_case(400, 170, 0);
    run_case(401, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
