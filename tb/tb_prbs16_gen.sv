// tb_prbs16_gen: checks the PRBS word source against a bit-serial reference LFSR built
// here from the same polynomial, and checks that the sequence has period 2^16-1: the
// generator's internal state returns to the seed after exactly 65535 bits and never
// becomes zero. With 10 bits per word that is 65535 words until word and state repeat.
`timescale 1ps/1ps
module tb_prbs16_gen;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [9:0] word;
  int checks = 0, failures = 0;

  prbs16_gen dut (.clk, .rst_n, .en, .word);

  always #500 clk = ~clk;

  logic [15:0] ref_s;
  int ones = 0, nbits = 0;
  task automatic ref_word(output logic [9:0] w);
    for (int i = 0; i < 10; i++) begin
      w[i] = ref_s[15];
      ref_s = {ref_s[14:0], ref_s[15] ^ ref_s[14] ^ ref_s[12] ^ ref_s[3]};
    end
  endtask

  initial begin
    logic [9:0] w;
    int period;
    bit found;
    ref_s = 16'hACE1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Enable with gaps: the word must only advance when en is high.
    for (int n = 0; n < 2000; n++) begin
      en = (n % 3) != 2;
      @(posedge clk); #1;
      if (en) begin
        ref_word(w);
        checks++;
        if (word !== w) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: %b expected %b", n, word, w);
        end
        for (int i = 0; i < 10; i++) ones += word[i];
        nbits += 10;
      end
    end
    // Balance: a maximal-length sequence is close to half ones.
    checks++;
    if (ones < nbits * 45 / 100 || ones > nbits * 55 / 100) begin
      failures++;
      $display("FAIL ones=%0d of %0d", ones, nbits);
    end
    // Period: step the internal state one word at a time and look for the seed.
    en = 1'b1;
    found = 0;
    period = 0;
    for (int n = 1; n <= 70000 && !found; n++) begin
      @(posedge clk); #1;
      checks++;
      if (dut.lfsr_q == 16'h0) begin failures++; $display("FAIL zero state"); end
      if (dut.lfsr_q == 16'hACE1) begin found = 1; period = n; end
    end
    // 2000 gapped steps were (2000*2/3 rounded up) = 1334 words already taken.
    checks++;
    if (!found || ((period + 1334) * 10) % 65535 != 0) begin
      failures++;
      $display("FAIL seed returned after %0d further words", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
