// phase_ctrl_fsm: phase control of the CDR, turning counter overflows into interpolator
// settings. The sampling phase has 16 positions per bit time (4 clock phases 100 ps apart,
// each interval cut into 4 steps of 25 ps). A lead_ov moves it one step later, a lag_ov
// one step earlier, and from the last position it wraps to the first, so a constant
// frequency offset can be followed indefinitely.
// Fine tune is a 4-bit thermometer shift register: a 1 shifted in adds one interpolator
// leg to the odd-phase side, a 0 removes one. Coarse tune is a 2-bit segment register and
// a little combinational logic that picks the two neighbouring phases: the even input is
// Ph0 or Ph2 (sel_a), the odd input Ph1 or Ph3 (sel_b). Within even segments the
// thermometer fills as the phase moves later, within odd segments it empties; so a phase
// input is only ever exchanged while its weight is zero, and the output clock never jumps.
//   position p = 4*seg + k,   ones(fine) = k (seg even) or 4-k (seg odd)
//   sel_a = seg[1]^seg[0],    sel_b = seg[1]
// lock is set when a move reverses the direction of the previous move (the phase toggles
// back and forth around the optimum) and cleared by two moves in the same direction.
// Interface: overflows sampled on the rising clk edge; ctrl, pos and lock are registered.
// From the original design: fine tune as a thermometer shift register, coarse tune as
// combinational logic, 2-bit coarse and 4-bit fine control (Fig. 3-2), 25 ps steps between
// phases 100 ps apart, linear one-step search, lock when the phase changes back and forth.
// Own choices: the exact coarse encoding and the zig-zag thermometer order (the state
// diagram is not given), wrap-around at the ends, and the lock flag's clearing rule.
`timescale 1ps/1ps
module phase_ctrl_fsm (
  input  logic              clk,
  input  logic              rst_n,    // synchronous, active low: position 0
  input  logic              lead_ov,  // clock early: move later
  input  logic              lag_ov,   // clock late: move earlier
  output trx_pkg::pi_ctrl_t ctrl,
  output logic [3:0]        pos,      // current position 0..15, for observation
  output logic              lock
);
  logic [1:0] seg_q;
  logic [3:0] fine_q;              // thermometer: 0000, 0001, 0011, 0111, 1111
  logic       last_up_q, moved_q;  // direction of the previous move, any move seen
  logic       up, dn;
  logic       at_bound;            // at the first position of a segment

  assign at_bound = seg_q[0] ? (fine_q == 4'b1111) : (fine_q == 4'b0000);

  assign up = lead_ov && !lag_ov;
  assign dn = lag_ov && !lead_ov;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seg_q     <= 2'd0;
      fine_q    <= 4'b0000;
      last_up_q <= 1'b0;
      moved_q   <= 1'b0;
      lock      <= 1'b0;
    end else if (up || dn) begin
      // Filling the thermometer moves later in even segments and earlier in odd ones;
      // stepping back across a segment boundary enters a segment of the other parity.
      if (up ^ seg_q[0] ^ (dn && at_bound)) fine_q <= {fine_q[2:0], 1'b1};
      else               fine_q <= {1'b0, fine_q[3:1]};
      // Segment boundaries: reached on the way up, left on the way down.
      if (up && !seg_q[0] && fine_q == 4'b0111) seg_q <= seg_q + 2'd1;
      if (up &&  seg_q[0] && fine_q == 4'b0001) seg_q <= seg_q + 2'd1;
      if (dn && at_bound) seg_q <= seg_q - 2'd1;
      last_up_q <= up;
      moved_q   <= 1'b1;
      if (moved_q) lock <= (last_up_q != up);
    end
  end

  // Coarse tune: combinational choice of the two neighbouring phases.
  assign ctrl.sel_a = seg_q[1] ^ seg_q[0];
  assign ctrl.sel_b = seg_q[1];
  assign ctrl.fine  = fine_q;

  // Observation: k counts up within even segments and down within odd ones.
  always_comb begin
    logic [2:0] ones;
    ones = 3'(fine_q[0]) + 3'(fine_q[1]) + 3'(fine_q[2]) + 3'(fine_q[3]);
    pos  = {seg_q, 2'b00} + (seg_q[0] ? 4'(3'd4 - ones) : 4'(ones));
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   fine_q inside {4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1111});
endmodule
