// trx_pkg: constants shared by the 2.5 Gb/s transceiver.
// The 10-bit parallel word, the 4 clock phases of 2.5 GHz spaced 100 ps apart and the
// 4 interpolation steps between neighbouring phases (25 ps resolution, 16 positions per
// unit interval) follow the original design. The confidence-counter half length of 6 follows the
// original counter analysis. The phase-position type is this design's own encoding.
`timescale 1ps/1ps
package trx_pkg;
  localparam int unsigned WORD_W      = 10; // serializer / deserializer width
  localparam int unsigned N_PHASE     = 4;  // 2.5 GHz clock phases fed to the interpolator
  localparam int unsigned FINE_STEPS  = 4;  // thermometer legs per interpolator side
  localparam int unsigned PHASE_POS   = N_PHASE * FINE_STEPS; // 16 positions per UI
  localparam int unsigned CC_HALF     = 6;  // token steps from the middle to an overflow
  localparam int unsigned PHASE_SPACING_PS = 100; // spacing of the 4 phases
  localparam int unsigned UI_PS       = 400; // 2.5 Gb/s bit time

  // Decision of the Alexander phase detector for one bit.
  typedef struct packed {
    logic lead; // clock early: falling-edge sample still equals the previous bit
    logic lag;  // clock late: falling-edge sample already equals the next bit
    logic hold; // no transition between the two bits
  } pd_dec_t;

  // Control word of the phase interpolator.
  typedef struct packed {
    logic       sel_b;  // odd input: 0 = Ph1, 1 = Ph3
    logic       sel_a;  // even input: 0 = Ph0, 1 = Ph2
    logic [3:0] fine;   // thermometer, number of ones = weight of the odd input
  } pi_ctrl_t;
endpackage
