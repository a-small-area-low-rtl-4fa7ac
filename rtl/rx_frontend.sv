// rx_frontend: behavioural model (not synthesizable) of the inverter-based receiver
// front-end. The real circuit is a fully differential chain of self-biased inverter
// stages (an inverter with a transmission gate from output to input sets each node to
// VDD/2, so no common-mode feedback is needed) with cross-coupled inverters between the
// two rails that give hysteresis; the swing grows stage by stage to full CMOS levels.
// The model slices the differential input vd = vip - vin (millivolts): dout goes to 1
// when vd exceeds +HYST_MV, to 0 when it falls below -HYST_MV, and otherwise keeps its
// value, after a delay of TD_PS. The common-mode level has no effect, as in the circuit.
// From the original design: output 1 for positive vd and 0 for negative vd, hysteresis from
// cross-coupled inverters, insensitivity to common mode (Fig. 4-9, 4-10).
// Own choices: the hysteresis width and the delay, which the original design does not give.
`timescale 1ps/1ps
module rx_frontend #(
  parameter real         HYST_MV = 20.0,
  parameter int unsigned TD_PS   = 30
) (
  input  real  vip_mv,
  input  real  vin_mv,
  output logic dout
);
  initial dout = 1'b0;

  always @(vip_mv or vin_mv) begin
    if (vip_mv - vin_mv > HYST_MV)       dout <= #(TD_PS) 1'b1;
    else if (vip_mv - vin_mv < -HYST_MV) dout <= #(TD_PS) 1'b0;
  end
endmodule
