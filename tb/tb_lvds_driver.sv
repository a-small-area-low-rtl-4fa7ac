// tb_lvds_driver: toggles the driver input with random bits and checks, just before and
// just after the output delay, that the two pad voltages are centred on the common-mode
// level, 350 mV apart, with the positive pad high for a 1.
`timescale 1ps/1ps
module tb_lvds_driver;
  logic din = 1'b0;
  real vop, von;
  int checks = 0, failures = 0;

  lvds_driver dut (.din, .vop_mv(vop), .von_mv(von));

  task automatic expect_level(input logic b, input string when_s);
    real vd, vcm;
    vd  = vop - von;
    vcm = (vop + von) / 2.0;
    checks++;
    if ((b ? vd : -vd) < 349.0 || (b ? vd : -vd) > 351.0 || vcm < 1199.0 || vcm > 1201.0) begin
      failures++;
      $display("FAIL %s: bit %b vop=%f von=%f", when_s, b, vop, von);
    end
  endtask

  initial begin
    logic prev, b;
    prev = 1'b0;
    #100;
    expect_level(1'b0, "idle");
    for (int i = 0; i < 200; i++) begin
      b = 1'($urandom);
      din = b;
      #15 expect_level(prev, "before delay");
      #10 expect_level(b, "after delay");
      prev = b;
      #375;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
