// tb_phase_interp: feeds four ideal 2.5 GHz phases 100 ps apart and, for each of the 16
// control words of the phase sequence (and back down again), measures the output's
// rising and falling edge times. The rising edge must sit p*25 ps after Ph0's rising
// edge (modulo the 400 ps period) and the clock must keep a 200 ps high time.
`timescale 1ps/1ps
module tb_phase_interp;
  logic [3:0] ph = '0;
  trx_pkg::pi_ctrl_t ctrl = '0;
  logic clk_out;
  int checks = 0, failures = 0;

  phase_interp dut (.ph, .ctrl, .clk_out);

  for (genvar k = 0; k < 4; k++) begin : g_ph
    initial begin
      #(1000 + 100 * k);
      forever begin ph[k] = ~ph[k]; #200; end
    end
  end

  function automatic trx_pkg::pi_ctrl_t ctrl_of(int p);
    int s, k, ones;
    s = p / 4; k = p % 4;
    ones = (s % 2 == 0) ? k : 4 - k;
    ctrl_of.fine  = 4'((1 << ones) - 1);
    ctrl_of.sel_a = 1'(s[1] ^ s[0]);
    ctrl_of.sel_b = 1'(s[1]);
  endfunction

  time t_rise, t_fall;

  task automatic measure(input int p);
    int exp_ph, got_ph;
    @(posedge clk_out);           // let a setting change take effect
    @(posedge clk_out); t_rise = $time;
    @(negedge clk_out); t_fall = $time;
    exp_ph = (p * 25) % 400;
    got_ph = int'((t_rise - 1000) % 400);
    checks++;
    if (got_ph != exp_ph || t_fall - t_rise != 200) begin
      failures++;
      $display("FAIL p=%0d phase %0d exp %0d high %0t", p, got_ph, exp_ph, t_fall - t_rise);
    end
  endtask

  initial begin
    #1100;
    for (int p = 0; p < 16; p++) begin
      @(posedge clk_out); #1 ctrl = ctrl_of(p);
      measure(p);
    end
    for (int p = 15; p >= 0; p--) begin
      @(posedge clk_out); #1 ctrl = ctrl_of(p);
      measure(p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
