// tb_pll_8phase: gives the PLL model a 100 MHz reference and checks that locked rises,
// that every phase runs at 1.25 GHz (800 ps period, 400 ps high) and that ph[k] rises
// k*100 ps after ph[0].
`timescale 1ps/1ps
module tb_pll_8phase;
  logic ref_clk = 1'b0, rst_n = 1'b0;
  logic [7:0] ph;
  logic locked;
  int checks = 0, failures = 0;

  pll_8phase dut (.ref_clk, .rst_n, .ph, .locked);

  always #5000 ref_clk = ~ref_clk;

  time t_r [8];
  time t_f [8];

  initial begin
    #20000 rst_n = 1'b1;
    fork
      begin wait (locked); end
      begin #200000; end
    join_any
    checks++;
    if (!locked) begin failures++; $display("FAIL no lock"); end
    repeat (5) @(posedge ph[0]);
    for (int rep = 0; rep < 3; rep++) begin
      @(posedge ph[0]); t_r[0] = $time;
      @(negedge ph[0]); t_f[0] = $time;
      @(posedge ph[0]);
      checks++;
      if ($time - t_r[0] != 800 || t_f[0] - t_r[0] != 400) begin
        failures++;
        $display("FAIL period %0t high %0t", $time - t_r[0], t_f[0] - t_r[0]);
      end
      t_r[0] = $time;
      for (int k = 1; k < 8; k++) begin @(posedge ph[k]); t_r[k] = $time; end
      for (int k = 1; k < 8; k++) begin
        checks++;
        if (t_r[k] - t_r[0] != 100 * k) begin
          failures++;
          $display("FAIL ph[%0d] offset %0t", k, t_r[k] - t_r[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
