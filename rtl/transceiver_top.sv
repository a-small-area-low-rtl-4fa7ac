// transceiver_top: 2.5 Gb/s serial-link transceiver built around one multi-phase PLL.
// Transmit path: a 10-bit word, either from the on-chip PRBS generator (LFSR mode) or
// from the receiver's deserializer (loop-back mode), is serialized 10:1 on the 2.5 GHz
// clock and sent off chip by the differential driver. Receive path: the front-end slices
// the differential input, the CDR recovers clock and data, and the deserializer turns the
// recovered stream back into 10-bit words at 250 Mword/s. The PLL makes 8 phases of
// 1.25 GHz from a 100 MHz reference; XOR gates double them into 4 phases of 2.5 GHz, of
// which phase 0 clocks the transmitter and all four feed the CDR's interpolator.
// Interface: pll_rst_n starts the PLL; rst_n (synchronous in each clock domain) must stay
// low until pll_locked is high and a few bit clocks have passed. loopback selects the
// transmit source. The channel pads are real-valued voltages in millivolts. tx_clk and
// rx_clk (the recovered clock) are brought out with the observation signals of the CDR.
// From the original design: the block structure and the two test modes (Fig. 4-1, Sec. 4.7).
// Own choices: the separate PLL reset, the pad voltage representation, the observation
// ports. In loop-back mode the deserializer word crosses from the recovered clock to the
// transmit clock without synchronization, as in the original design's block diagram; this only
// holds without frequency offset between the two.
`timescale 1ps/1ps
module transceiver_top #(
  parameter int unsigned WORD_W  = trx_pkg::WORD_W,
  parameter int unsigned CC_HALF = trx_pkg::CC_HALF
) (
  input  logic              ref_clk,      // 100 MHz
  input  logic              pll_rst_n,
  input  logic              rst_n,
  input  logic              loopback,     // 0: PRBS source, 1: deserializer loop-back
  output real               tx_vop_mv,
  output real               tx_von_mv,
  input  real               rx_vip_mv,
  input  real               rx_vin_mv,
  output logic              pll_locked,
  output logic              tx_clk,
  output logic              tx_bit,       // serializer output ahead of the driver
  output logic              rx_clk,
  output logic              rx_bit,       // retimed bit
  output logic [WORD_W-1:0] rx_word,
  output logic              rx_word_valid,
  output logic              cdr_lock,
  output logic              cdr_lead_ov,
  output logic              cdr_lag_ov,
  output logic [3:0]        cdr_pos
);
  logic [7:0]        ph8;
  logic [3:0]        ph4;
  logic [WORD_W-1:0] prbs_word, tx_word;
  logic              word_take;
  logic              rx_sliced;

  pll_8phase u_pll (.ref_clk, .rst_n(pll_rst_n), .ph(ph8), .locked(pll_locked));
  phase_xor4 u_xor (.ph(ph8), .ck(ph4));
  assign tx_clk = ph4[0];

  // Transmitter
  prbs16_gen #(.WORD_W(WORD_W)) u_prbs (
    .clk(tx_clk), .rst_n, .en(word_take), .word(prbs_word)
  );
  assign tx_word = loopback ? rx_word : prbs_word;
  serializer_10to1 #(.WORD_W(WORD_W)) u_ser (
    .clk(tx_clk), .rst_n, .word_in(tx_word), .word_take, .out(tx_bit)
  );
  lvds_driver u_drv (.din(tx_bit), .vop_mv(tx_vop_mv), .von_mv(tx_von_mv));

  // Receiver
  rx_frontend u_rfe (.vip_mv(rx_vip_mv), .vin_mv(rx_vin_mv), .dout(rx_sliced));
  cdr #(.CC_HALF(CC_HALF)) u_cdr (
    .rst_n, .ph(ph4), .din(rx_sliced), .rclk(rx_clk), .rdata(rx_bit),
    .lead_ov(cdr_lead_ov), .lag_ov(cdr_lag_ov), .lock(cdr_lock), .pos(cdr_pos)
  );
  deserializer_1to10 #(.WORD_W(WORD_W)) u_des (
    .clk(rx_clk), .rst_n, .din(rx_bit), .word(rx_word), .word_valid(rx_word_valid)
  );
endmodule
