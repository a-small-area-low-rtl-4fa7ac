// serializer_10to1: shift-register 10:1 serializer (10-bit word in, 2.5 Gb/s bit stream out).
// The word is split into an even chain (D0 D2 D4 D6 D8) and an odd chain (D1 D3 D5 D7 D9),
// five flip-flops each. Both chains shift at half the bit rate, the "Ck1" clock, filling
// with zeros, and reload from a holding register once every five shifts (the "Ck2" load
// pulse). The holding register samples word_in once per word (the "Ck3" parallel clock).
// The odd chain's output is retimed by half a Ck1 period ("Ck1b"), and a 2:1 mux driven by
// the half-rate phase ("Ck4") alternates even and odd bits, so D0 leaves first and D9 last.
// Implementation: everything runs on the bit clock clk; the half-rate clocks are the
// phase bit cnt[0] of a 0..9 bit counter, used as clock enables, and the mux output is
// registered once more so that out is a clean flip-flop output.
// Interface: word_take is high in the cycle at whose end word_in is sampled; a source
// that updates on that same edge keeps exactly one word per 10 bit times. Latency: D0 is
// on out 6 clocks after the sampling edge, D9 15 clocks after it.
// From the original design: the two 5-bit chains with zero fill, load/shift muxes, holding
// register, half-cycle retime of the odd chain and the output mux (Fig. 4-2, 4-3).
// Own choices: the single-clock, clock-enable form and the word_take handshake.
`timescale 1ps/1ps
module serializer_10to1 #(
  parameter int unsigned WORD_W = trx_pkg::WORD_W
) (
  input  logic              clk,       // 2.5 GHz bit clock
  input  logic              rst_n,     // synchronous, active low
  input  logic [WORD_W-1:0] word_in,   // D0 = word_in[0] is sent first
  output logic              word_take, // word_in sampled at the end of this cycle ("Ck3")
  output logic              out        // serial data
);
  localparam int unsigned HALF = WORD_W / 2;
  localparam int unsigned CAPTURE = HALF - 1; // bit slot in which the word is sampled

  logic [$clog2(WORD_W)-1:0] cnt;
  logic [WORD_W-1:0] hold_q;             // parallel-load register
  logic [HALF-1:0]   ev_q, od_q;         // serial-shift chains, [0] next to the output
  logic              od_rt_q;            // odd chain retimed by half a Ck1 period
  logic              ck1_shift, ck2_load;

  assign word_take = (cnt == CAPTURE[$bits(cnt)-1:0]);
  assign ck1_shift = cnt[0];                                   // end of each bit pair
  assign ck2_load  = (cnt == $bits(cnt)'(WORD_W - 1));         // end of the word

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      hold_q  <= '0;
      ev_q    <= '0;
      od_q    <= '0;
      od_rt_q <= 1'b0;
      out     <= 1'b0;
    end else begin
      cnt <= ck2_load ? '0 : cnt + 1'b1;
      if (word_take) hold_q <= word_in;
      if (ck1_shift) begin
        if (ck2_load) begin
          for (int i = 0; i < int'(HALF); i++) begin
            ev_q[i] <= hold_q[2*i];
            od_q[i] <= hold_q[2*i+1];
          end
        end else begin
          ev_q <= {1'b0, ev_q[HALF-1:1]};
          od_q <= {1'b0, od_q[HALF-1:1]};
        end
      end
      if (!cnt[0]) od_rt_q <= od_q[0];          // Ck1b retime
      out <= cnt[0] ? od_rt_q : ev_q[0];         // Ck4 output mux
    end
  end

  initial assert (WORD_W % 2 == 0) else $error("WORD_W must be even");
endmodule
