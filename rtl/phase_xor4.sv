// phase_xor4: frequency doubler that turns the PLL's 8 phases of 1.25 GHz into the
// 4 phases of 2.5 GHz used by the CDR. Each output is the XOR of two PLL phases a quarter
// period (90 degrees, 200 ps) apart: ck[k] = ph[k] ^ ph[k+2]. With the 8 inputs spaced
// 100 ps apart, the XOR is high for 200 ps twice per 800 ps, so ck[k] is a 2.5 GHz clock
// with 50 % duty cycle whose rising edge coincides with the rising edge of ph[k]; the four
// outputs are again 100 ps apart. Purely combinational.
// From the original design: XOR gates make the 4-phase 2.5 GHz clock from the 8-phase PLL.
// Own choice: which pairs of phases are combined.
`timescale 1ps/1ps
module phase_xor4 (
  input  logic [7:0] ph,   // 1.25 GHz, ph[k] lags ph[0] by k*45 degrees
  output logic [3:0] ck    // 2.5 GHz, ck[k] lags ck[0] by k*90 degrees
);
  always_comb begin
    for (int k = 0; k < 4; k++) ck[k] = ph[k] ^ ph[k+2];
  end
endmodule
