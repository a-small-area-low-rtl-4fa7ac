// tb_phase_xor4: drives eight ideal 1.25 GHz phases 100 ps apart and checks that each of
// the four outputs is a 2.5 GHz clock (400 ps period, 200 ps high) and that ck[k] rises
// k*100 ps after ck[0]. Also checks the XOR truth on every input change.
`timescale 1ps/1ps
module tb_phase_xor4;
  logic [7:0] ph = '0;
  logic [3:0] ck;
  int checks = 0, failures = 0;

  phase_xor4 dut (.ph, .ck);

  initial begin
    int tick;
    tick = 0;
    forever begin
      for (int k = 0; k < 8; k++) ph[k] = ((tick - 2 * k + 16) % 16) < 8;
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (ck[k] !== (ph[k] ^ ph[k + 2])) begin failures++; $display("FAIL xor %0d", k); end
      end
      #49;
      tick = (tick + 1) % 16;
    end
  end

  time t0, tr, tf;
  initial begin
    #2000;
    for (int k = 0; k < 4; k++) begin
      @(posedge ck[0]); t0 = $time;
      if (k != 0) @(posedge ck[k]);
      tr = $time;
      @(negedge ck[k]); tf = $time;
      @(posedge ck[k]);
      checks++;
      if (tr - t0 != 100 * k || tf - tr != 200 || $time - tr != 400) begin
        failures++;
        $display("FAIL ck[%0d] offset %0t high %0t period %0t", k, tr - t0, tf - tr, $time - tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
