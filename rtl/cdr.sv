// cdr: all-digital clock and data recovery loop for 2.5 Gb/s NRZ data.
// Four 2.5 GHz clock phases 100 ps apart feed a phase interpolator whose output is the
// recovered clock. That clock drives an Alexander phase detector (lead / lag / hold per
// bit), a one-hot confidence counter that filters the decisions (HALF net leads or lags
// produce one overflow) and the phase control, which moves the interpolator one 25 ps
// step later on lead_ov and one step earlier on lag_ov. The loop is first order and
// bang-bang; once in lock the phase toggles between two neighbouring positions. A
// frequency offset between data and clock is followed by continual steps in one
// direction, wrapping around the 16 positions of the bit time.
// Interface: rclk is the recovered clock; rdata is the retimed bit, one per rclk rising
// edge; rst_n is synchronous to rclk, so rclk (and thus ph) must run while it is low.
// From the original design: the APD -> CC -> FSM -> PI loop clocked by the PI output (Fig. 3-2).
// Own choices: the exposed observation outputs.
`timescale 1ps/1ps
module cdr #(
  parameter int unsigned CC_HALF = trx_pkg::CC_HALF
) (
  input  logic              rst_n,
  input  logic [3:0]        ph,       // 2.5 GHz phases
  input  logic              din,      // sliced serial data
  output logic              rclk,
  output logic              rdata,
  output logic              lead_ov,
  output logic              lag_ov,
  output logic              lock,
  output logic [3:0]        pos
);
  trx_pkg::pd_dec_t  dec;
  trx_pkg::pi_ctrl_t ctrl;
  logic              hold_ov;

  alexander_pd u_apd (
    .clk(rclk), .rst_n, .din, .dec, .rdata
  );

  confidence_counter #(.HALF(CC_HALF)) u_cc (
    .clk(rclk), .rst_n, .dec, .lead_ov, .lag_ov, .hold_ov
  );

  phase_ctrl_fsm u_fsm (
    .clk(rclk), .rst_n, .lead_ov, .lag_ov, .ctrl, .pos, .lock
  );

  phase_interp u_pi (
    .ph, .ctrl, .clk_out(rclk)
  );

  // hold_ov only tells the phase control that nothing is to be done, which it infers.
  assert property (@(posedge rclk) disable iff (!rst_n) hold_ov == !(lead_ov || lag_ov));
endmodule
