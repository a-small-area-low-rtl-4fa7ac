// alexander_pd: Alexander (bang-bang) phase detector with data retiming.
// The data input is sampled on every rising clock edge (the bit centre) and on every
// falling edge (the expected bit boundary). For two consecutive rising-edge samples A
// (older) and C (newer) and the falling-edge sample B between them:
//   A == B != C  -> lead : the falling edge came before the data transition (clock early)
//   A != B == C  -> lag  : the falling edge came after the transition (clock late)
//   A == B == C  -> hold : no transition, no phase information
//   A == C != B  -> none of the three (glitch, two transitions in one bit).
// The falling-edge sample is retimed to the rising edge so that all three come from the
// same clock domain. rdata is the rising-edge sample, i.e. the recovered bit.
// Interface: dec is registered; dec for the bit pair (A,C) is valid two rising edges after
// C was sampled. rdata is valid one rising edge after its sample.
// From the original design: the sampling scheme and the lead/lag/hold truth table (Fig. 3-3).
// Own choices: the output register, and flagging nothing for the A == C != B pattern.
`timescale 1ps/1ps
module alexander_pd (
  input  logic              clk,    // recovered (interpolated) clock
  input  logic              rst_n,  // synchronous to the rising edge, active low
  input  logic              din,    // sliced serial data
  output trx_pkg::pd_dec_t  dec,
  output logic              rdata
);
  logic s_fall;          // falling-edge sample
  logic a_q, b_q, c_q;   // aligned samples, rising-edge domain

  always_ff @(negedge clk) s_fall <= din;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= 1'b0;
      b_q <= 1'b0;
      c_q <= 1'b0;
      dec <= '0;
    end else begin
      c_q <= din;
      a_q <= c_q;
      b_q <= s_fall;
      dec.lead <= (a_q == b_q) && (b_q != c_q);
      dec.lag  <= (a_q != b_q) && (b_q == c_q);
      dec.hold <= (a_q == b_q) && (b_q == c_q);
    end
  end

  assign rdata = c_q;

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({dec.lead, dec.lag, dec.hold}));
endmodule
