// deserializer_1to10: 1:10 deserializer for the recovered 2.5 Gb/s stream.
// A half-rate phase ("CK1") steers even-numbered bits into register A and odd-numbered
// bits into register C; B is A re-sampled so that each even bit and the following odd bit
// are presented together. Those pairs shift into an even and an odd 5-bit chain, and once
// every ten bits ("CK3", 250 MHz) the two chains are loaded, interleaved, into the output
// word. The first bit of a frame lands in word[0]. Word boundaries are wherever the bit
// counter starts after reset: aligning words to a character boundary is left to the
// decoder that follows, as in the original design.
// Implementation: one clock, the recovered bit clock; CK1 and CK3 are a 0..9 bit counter
// and its phase bit used as clock enables.
// Interface: word_valid pulses for one clock when word changes; word then stays for ten
// clocks. Latency: bit 9 of a frame is sampled at a clock edge and appears in word two
// edges later.
// From the original design: A/B/C split by CK1, even/odd chains, parallel load at CK3 (Fig. 4-12).
// Own choices: the single-clock form, the word_valid strobe, reset to frame start.
`timescale 1ps/1ps
module deserializer_1to10 #(
  parameter int unsigned WORD_W = trx_pkg::WORD_W
) (
  input  logic              clk,        // recovered bit clock
  input  logic              rst_n,      // synchronous, active low
  input  logic              din,        // recovered data, one bit per clk
  output logic [WORD_W-1:0] word,
  output logic              word_valid
);
  localparam int unsigned HALF = WORD_W / 2;

  logic [$clog2(WORD_W)-1:0] cnt;
  logic            a_q, b_q, c_q;
  logic [HALF-1:0] ev_q, od_q;       // [HALF-1] newest
  logic            pair_rdy;         // b_q/c_q hold a fresh pair
  logic            frame_rdy;        // chains hold a complete frame

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      a_q        <= 1'b0;
      b_q        <= 1'b0;
      c_q        <= 1'b0;
      ev_q       <= '0;
      od_q       <= '0;
      pair_rdy   <= 1'b0;
      frame_rdy  <= 1'b0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      cnt <= (cnt == $bits(cnt)'(WORD_W - 1)) ? '0 : cnt + 1'b1;
      if (!cnt[0]) begin
        a_q <= din;                      // even bit
      end else begin
        b_q <= a_q;                      // even bit re-sampled beside its odd partner
        c_q <= din;                      // odd bit
      end
      pair_rdy <= cnt[0];
      if (pair_rdy) begin
        ev_q <= {b_q, ev_q[HALF-1:1]};
        od_q <= {c_q, od_q[HALF-1:1]};
      end
      frame_rdy  <= pair_rdy && (cnt == '0);   // last pair of a frame just shifted in
      word_valid <= frame_rdy;
      if (frame_rdy) begin
        for (int i = 0; i < int'(HALF); i++) begin
          word[2*i]   <= ev_q[i];
          word[2*i+1] <= od_q[i];
        end
      end
    end
  end

  initial assert (WORD_W % 2 == 0) else $error("WORD_W must be even");
endmodule
