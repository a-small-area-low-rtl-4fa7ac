// tb_rx_frontend: drives differential voltages into the receiver model and checks the
// slicing: a difference above +20 mV gives 1 and below -20 mV gives 0 after the 30 ps
// delay, anything in between keeps the previous output (hysteresis), and the result does
// not depend on the common-mode level.
`timescale 1ps/1ps
module tb_rx_frontend;
  real vip = 1200.0, vin = 1200.0;
  logic dout;
  int checks = 0, failures = 0;

  rx_frontend dut (.vip_mv(vip), .vin_mv(vin), .dout);

  logic model = 1'b0, prev_model;
  int n_hold = 0;

  initial begin
    #100;
    for (int i = 0; i < 2000; i++) begin
      real vcm, vd;
      vcm = 600.0 + real'($urandom_range(0, 1000));
      vd  = real'($urandom_range(0, 400)) - 200.0;
      prev_model = model;
      vip = vcm + vd / 2.0;
      vin = vcm - vd / 2.0;
      if (vd > 20.0) model = 1'b1;
      else if (vd < -20.0) model = 1'b0;
      else n_hold++;
      #10;
      checks++;
      if (dout !== prev_model) begin
        failures++;
        if (failures < 10) $display("FAIL output changed before the delay");
      end
      #30;
      checks++;
      if (dout !== model) begin
        failures++;
        if (failures < 10) $display("FAIL vd=%f vcm=%f dout=%b exp=%b", vd, vcm, dout, model);
      end
      #60;
    end
    checks++;
    if (n_hold < 20) begin failures++; $display("FAIL hysteresis band never exercised"); end
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
