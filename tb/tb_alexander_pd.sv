// tb_alexander_pd: drives random data whose transitions fall at a chosen offset after the
// rising clock edge. Transitions after the falling edge (offset 300 of 400 ps) must give
// lead, transitions before it (offset 100 ps) lag, bits without a transition hold, and
// rdata must be the rising-edge sample. Decisions are predicted bit by bit from the
// rising-edge samples the bench records.
`timescale 1ps/1ps
module tb_alexander_pd;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  trx_pkg::pd_dec_t dec;
  logic rdata;
  int checks = 0, failures = 0;
  int offset_ps = 300;
  int n_lead = 0, n_lag = 0, n_hold = 0;

  alexander_pd dut (.clk, .rst_n, .din, .dec, .rdata);

  always #200 clk = ~clk;

  // Data source: new random bit offset_ps after each rising edge.
  always @(posedge clk) begin
    #(offset_ps) din = 1'($urandom);
  end

  logic r [0:4095];
  int m = 0, since_rst = 0;
  always @(posedge clk) begin
    r[m] = din;                       // value sampled at this edge
    since_rst = rst_n ? since_rst + 1 : 0;
    if (since_rst > 5) begin
      logic a, c, exp_lead, exp_lag, exp_hold;
      a = r[m-3];
      c = r[m-2];
      exp_hold = (a == c);
      exp_lead = (a != c) && (offset_ps > 200);
      exp_lag  = (a != c) && (offset_ps < 200);
      checks++;
      if (dec.lead !== exp_lead || dec.lag !== exp_lag || dec.hold !== exp_hold) begin
        failures++;
        if (failures < 10) $display("FAIL edge %0d dec=%b exp=%b%b%b", m, dec, exp_lead, exp_lag, exp_hold);
      end
      checks++;
      if (rdata !== r[m-1]) begin
        failures++;
        if (failures < 10) $display("FAIL edge %0d rdata", m);
      end
      n_lead += dec.lead;
      n_lag  += dec.lag;
      n_hold += dec.hold;
    end
    m++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (m == 1000);
    // The pair straddling the change is not predictable from offset_ps: reset around it.
    rst_n <= 1'b0;
    @(posedge clk);
    offset_ps = 100;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (m == 2000);
    checks++;
    if (n_lead < 300 || n_lag < 300 || n_hold < 300) begin
      failures++;
      $display("FAIL coverage lead=%0d lag=%0d hold=%0d", n_lead, n_lag, n_hold);
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
