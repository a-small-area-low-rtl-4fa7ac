// confidence_counter: accumulation-type confidence counter, the loop filter of the CDR.
// A single token moves along a one-hot chain of 2*HALF-1 flip-flops. It starts in the
// middle; every lead moves it one place toward the lead end, every lag one place toward
// the lag end, hold (and anything else) leaves it where it is. When a lead would move it
// out of the lead end, the token restarts in the middle and lead_ov is raised for one
// clock; likewise lag_ov at the other end. HALF leads more than lags, in any order, are
// needed for one lead_ov, so isolated wrong decisions caused by noise are filtered out.
// hold_ov is high whenever neither overflow is present (NOR of the two outputs).
// Interface: one decision per rising clk edge; lead_ov/lag_ov are registered, one clock
// after the decision that caused them; the token is back in the middle on that same edge.
// From the original design: one-hot token chain, restart at the middle, registered overflow
// outputs and the NOR hold signal (Fig. 3-6), six steps from the middle to an overflow
// (counter size of Eq. 3-8 and Fig. 3-14).
// Own choices: synchronous reset; an invalid (all-zero) decision leaves the token alone.
`timescale 1ps/1ps
module confidence_counter #(
  parameter int unsigned HALF = trx_pkg::CC_HALF
) (
  input  logic             clk,
  input  logic             rst_n,    // synchronous, active low: token to the middle
  input  trx_pkg::pd_dec_t dec,
  output logic             lead_ov,
  output logic             lag_ov,
  output logic             hold_ov
);
  localparam int unsigned LEN = 2 * HALF - 1;   // chain positions 0 (lead end) .. LEN-1
  localparam int unsigned MID = HALF - 1;

  logic [LEN-1:0] tok_q, tok_d;
  logic           lead_d, lag_d;

  always_comb begin
    tok_d  = tok_q;
    lead_d = 1'b0;
    lag_d  = 1'b0;
    if (dec.lead && !dec.lag) begin
      if (tok_q[0]) begin
        tok_d  = LEN'(1) << MID;
        lead_d = 1'b1;
      end else begin
        tok_d = tok_q >> 1;
      end
    end else if (dec.lag && !dec.lead) begin
      if (tok_q[LEN-1]) begin
        tok_d = LEN'(1) << MID;
        lag_d = 1'b1;
      end else begin
        tok_d = tok_q << 1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok_q   <= LEN'(1) << MID;
      lead_ov <= 1'b0;
      lag_ov  <= 1'b0;
    end else begin
      tok_q   <= tok_d;
      lead_ov <= lead_d;
      lag_ov  <= lag_d;
    end
  end

  assign hold_ov = !(lead_ov || lag_ov);

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(tok_q));
  initial assert (HALF >= 2) else $error("HALF must be at least 2");
endmodule
