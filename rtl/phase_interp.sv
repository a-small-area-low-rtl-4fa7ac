// phase_interp: behavioural model (not synthesizable) of the digitally controlled phase
// interpolator. The real circuit has two banks of four tri-state inverters whose outputs
// are shorted; the even bank is driven by Ph0 or Ph2, the odd bank by Ph1 or Ph3, and the
// thermometer word fine switches on as many odd-bank legs as it has ones (the even bank
// gets the rest). The merged edge lies between the two input edges in proportion to the
// weights, in 25 ps steps across the 100 ps between neighbouring phases.
// The model reproduces the ideal (linear) transfer: every edge of the input that leads
// is passed on after w * SPACING_PS, where w is the weight of the lagging input. Which
// input leads follows from the selection: with Ph0/Ph1 or Ph2/Ph3 the even input leads,
// with Ph2/Ph1 or Ph0/Ph3 the odd input does. A phase is only exchanged while its weight
// is zero, so changing ctrl never creates an extra edge.
// From the original design: two shorted tri-state inverter banks, 4 phases 100 ps apart, 2-bit
// coarse and 4-bit thermometer fine control, four steps per interval (Fig. 3-9, 3-10).
// Own choices: ideal linearity and zero intrinsic delay.
`timescale 1ps/1ps
module phase_interp #(
  parameter int unsigned SPACING_PS = trx_pkg::PHASE_SPACING_PS,
  parameter int unsigned LEGS       = trx_pkg::FINE_STEPS
) (
  input  logic [3:0]        ph,      // 2.5 GHz, ph[k] lags ph[0] by k*SPACING_PS
  input  trx_pkg::pi_ctrl_t ctrl,
  output logic              clk_out
);
  logic [3:0]  ph_prev;
  int unsigned ones, lead_idx, dly;

  always_comb begin
    ones = $countones(ctrl.fine);
    if (ctrl.sel_a == ctrl.sel_b) begin
      lead_idx = ctrl.sel_a ? 2 : 0;                       // even input leads
      dly      = SPACING_PS * ones / LEGS;
    end else begin
      lead_idx = ctrl.sel_b ? 3 : 1;                       // odd input leads
      dly      = SPACING_PS * (LEGS - ones) / LEGS;
    end
  end

  initial begin
    clk_out = 1'b0;
    ph_prev = '0;
  end

  always @(ph) begin
    if (ph[lead_idx] != ph_prev[lead_idx]) clk_out <= #(dly) ph[lead_idx];
    ph_prev = ph;
  end
endmodule
