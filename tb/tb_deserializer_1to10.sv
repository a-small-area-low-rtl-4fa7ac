// tb_deserializer_1to10: feeds a pseudo-random bit stream into the deserializer and checks
// every output word against the ten bits of its frame (first bit in word[0]), the
// two-edge latency from the last bit of a frame to word_valid, and that word_valid comes
// exactly once every ten clocks.
`timescale 1ps/1ps
module tb_deserializer_1to10;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic [9:0] word;
  logic word_valid;
  int checks = 0, failures = 0;

  deserializer_1to10 dut (.clk, .rst_n, .din, .word, .word_valid);

  always #200 clk = ~clk;

  // Reference: bits sent per clock, indexed from the first clock after reset.
  logic bits [0:4095];
  int   nsent = 0;
  int   last_valid = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      // word_valid seen here was set one edge ago; the word was loaded two edges after
      // the DUT sampled the frame's last bit, which the bench had driven one edge earlier.
      // The DUT's first bit after reset is the idle 0 driven before bits[0].
      if (word_valid && nsent >= 14) begin
        int f_end;
        logic [9:0] exp_w;
        f_end = nsent - 4;   // index of the last bit of the frame
        for (int i = 0; i < 10; i++) exp_w[i] = bits[f_end - 9 + i];
        checks++;
        if (word !== exp_w || ((f_end + 2) % 10) != 0) begin
          failures++;
          $display("FAIL word %b expected %b (frame end %0d)", word, exp_w, f_end);
        end
        if (last_valid >= 0) begin
          checks++;
          if (nsent - last_valid != 10) begin
            failures++;
            $display("FAIL word spacing %0d", nsent - last_valid);
          end
        end
        last_valid = nsent;
      end
      bits[nsent] = $urandom_range(0, 1);
      din <= bits[nsent];
      nsent++;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (nsent == 2000);
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
