// prbs16_gen: pseudo-random word source for testing the transmitter on its own.
// A 16-stage Fibonacci linear feedback shift register whose feedback is the XOR of
// stages 16, 15, 13 and 4 (polynomial x^16+x^15+x^13+x^4+1, maximal length) repeats after
// 2^16-1 bits and never reaches the all-zero state. Each enabled clock advances the register
// by WORD_W bit times at once and presents those WORD_W bits as one parallel word, oldest
// bit in word[0], so that a serializer sending word[0] first reproduces the serial sequence.
// Interface: clk, synchronous active-low rst_n (loads SEED), en advances one word; word is
// registered and valid one clock after en.
// From the original design: sixteen flip-flops, XOR feedback, period 2^16-1, no all-zero state.
// Own choices: the tap set (the original design does not name it), the seed and the word packing.
`timescale 1ps/1ps
module prbs16_gen #(
  parameter int unsigned      WORD_W = 10,
  parameter logic [15:0]      SEED   = 16'hACE1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic [WORD_W-1:0] word
);
  logic [15:0] lfsr_q, lfsr_d;
  logic [WORD_W-1:0] word_d;

  // Step the register WORD_W times; each step emits bit 15 and shifts in the feedback.
  always_comb begin
    logic [15:0] s;
    s = lfsr_q;
    word_d = '0;
    for (int i = 0; i < int'(WORD_W); i++) begin
      word_d[i] = s[15];
      s = {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
    end
    lfsr_d = s;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr_q <= SEED;
      word   <= '0;
    end else if (en) begin
      lfsr_q <= lfsr_d;
      word   <= word_d;
    end
  end

  initial assert (SEED != 16'h0) else $error("PRBS seed must be non-zero");
endmodule
