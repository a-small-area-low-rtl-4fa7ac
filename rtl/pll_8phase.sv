// pll_8phase: behavioural model (not synthesizable) of the mixed-signal multi-phase PLL.
// The real part is a ring-oscillator PLL running at 1.25 GHz from a 100 MHz reference and
// delivering 8 phases 45 degrees (100 ps) apart. The model measures the reference period
// over one cycle, waits LOCK_CYCLES further reference cycles, raises locked and then runs
// an ideal oscillator at MULT times the reference frequency. ph[k] is high for half a
// period starting k/8 of a period after ph[0] rises. The oscillator period follows the
// reference, so a reference with a frequency offset gives a proportionally offset clock.
// No jitter, loop dynamics or drift after lock are modelled.
// From the original design: 8 phases, 1.25 GHz, ring oscillator, 100 MHz reference (Fig. 4-1).
// Own choices: the lock delay and the locked output.
`timescale 1ps/1ps
module pll_8phase #(
  parameter real         MULT        = 12.5, // 1.25 GHz / 100 MHz
  parameter int unsigned LOCK_CYCLES = 4
) (
  input  logic       ref_clk,
  input  logic       rst_n,     // asynchronous, active low: oscillator stops
  output logic [7:0] ph,
  output logic       locked
);
  realtime t_last, t_ref;
  int unsigned n_ref;

  initial begin
    ph     = '0;
    locked = 1'b0;
    n_ref  = 0;
    t_last = 0;
    t_ref  = 0;
  end

  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      n_ref  = 0;
      locked = 1'b0;
    end else begin
      if (n_ref > 0) t_ref = $realtime - t_last;
      t_last = $realtime;
      if (n_ref < LOCK_CYCLES + 1) n_ref = n_ref + 1;
      else locked = 1'b1;
    end
  end

  // Ideal oscillator: 16 ticks per period, ph[k] high during ticks 2k .. 2k+7 (mod 16).
  initial begin
    int unsigned tick;
    tick = 0;
    forever begin
      if (locked && rst_n) begin
        for (int k = 0; k < 8; k++) ph[k] = ((tick - 2*k) % 16) < 8;
        tick = (tick + 1) % 16;
        #(t_ref / MULT / 16.0);
      end else begin
        ph   = '0;
        tick = 0;
        @(posedge locked);
      end
    end
  end
endmodule
