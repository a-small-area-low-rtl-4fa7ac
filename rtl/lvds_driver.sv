// lvds_driver: behavioural model (not synthesizable) of the current-source-free output
// driver. The real circuit is two inverters connected back to back across the
// differential pair, split into several small drivers; it pushes the serial bit onto the
// channel as a differential voltage. The model gives the two pad voltages in millivolts:
// a common-mode level VCM_MV with the pair VOD_MV apart, positive side high for a 1, each
// transition delayed by TD_PS.
// From the original design: differential output, no current sources, inverter-based.
// Own choices: the LVDS-style levels (350 mV swing, 1.2 V common mode) and the delay;
// the original design gives neither.
`timescale 1ps/1ps
module lvds_driver #(
  parameter real         VCM_MV = 1200.0,
  parameter real         VOD_MV = 350.0,
  parameter int unsigned TD_PS  = 20
) (
  input  logic din,
  output real  vop_mv,
  output real  von_mv
);
  initial begin
    vop_mv = VCM_MV - VOD_MV / 2.0;
    von_mv = VCM_MV + VOD_MV / 2.0;
  end

  always @(din) begin
    vop_mv <= #(TD_PS) din ? VCM_MV + VOD_MV / 2.0 : VCM_MV - VOD_MV / 2.0;
    von_mv <= #(TD_PS) din ? VCM_MV - VOD_MV / 2.0 : VCM_MV + VOD_MV / 2.0;
  end
endmodule
