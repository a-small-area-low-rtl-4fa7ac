// tb_phase_ctrl_fsm: compares the phase control with an arithmetic model. The model keeps
// the position p (0..15, wrapping) and derives the expected control word directly:
// segment s = p/4, k = p%4, number of thermometer ones k (s even) or 4-k (s odd),
// sel_a = s[1]^s[0], sel_b = s[1]. Lock must follow the direction of the last two moves.
// Random overflow streams move the phase through several full turns in both directions.
`timescale 1ps/1ps
module tb_phase_ctrl_fsm;
  logic clk = 1'b0, rst_n = 1'b0, lead_ov = 1'b0, lag_ov = 1'b0;
  trx_pkg::pi_ctrl_t ctrl;
  logic [3:0] pos;
  logic lock;
  int checks = 0, failures = 0;
  int n_wrap_up = 0, n_wrap_dn = 0, n_lock = 0;

  phase_ctrl_fsm dut (.clk, .rst_n, .lead_ov, .lag_ov, .ctrl, .pos, .lock);

  always #200 clk = ~clk;

  int p = 0, last_dir = 0, moves = 0;
  bit exp_lock = 0;

  task automatic check_outputs();
    int s, k, ones;
    logic [3:0] therm;
    s = p / 4;
    k = p % 4;
    ones = (s % 2 == 0) ? k : 4 - k;
    therm = 4'((1 << ones) - 1);
    checks++;
    if (pos !== 4'(p) || ctrl.fine !== therm || ctrl.sel_a !== 1'(s[1] ^ s[0]) ||
        ctrl.sel_b !== 1'(s[1]) || lock !== exp_lock) begin
      failures++;
      if (failures < 10) $display("FAIL p=%0d pos=%0d ctrl=%b lock=%b exp_lock=%b", p, pos, ctrl, lock, exp_lock);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1 check_outputs();
    for (int i = 0; i < 4000; i++) begin
      int r, dir;
      r = $urandom_range(0, 99);
      // Phases of the test: runs up, runs down, then dithering.
      if (i < 1000)      dir = (r < 70) ? 1 : (r < 80 ? -1 : 0);
      else if (i < 2000) dir = (r < 70) ? -1 : (r < 80 ? 1 : 0);
      else               dir = (r < 40) ? 1 : (r < 80 ? -1 : 0);
      if (r >= 97) begin lead_ov = 1; lag_ov = 1; dir = 0; end   // both: no move
      else begin lead_ov = (dir == 1); lag_ov = (dir == -1); end
      @(posedge clk);
      if (dir != 0) begin
        if (dir == 1 && p == 15) n_wrap_up++;
        if (dir == -1 && p == 0) n_wrap_dn++;
        p = (p + dir + 16) % 16;
        if (moves > 0) exp_lock = (dir != last_dir);
        if (exp_lock) n_lock++;
        last_dir = dir;
        moves++;
      end
      #1 check_outputs();
    end
    checks++;
    if (n_wrap_up == 0 || n_wrap_dn == 0 || n_lock == 0) begin
      failures++;
      $display("FAIL coverage wraps %0d/%0d lock %0d", n_wrap_up, n_wrap_dn, n_lock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
