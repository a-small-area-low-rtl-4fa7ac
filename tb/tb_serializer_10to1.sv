// tb_serializer_10to1: drives random words with the word_take handshake and checks the
// serial output bit by bit: word bit i must appear 6 + i clocks after the edge that
// sampled the word (D0 first), and word_take must come once every 10 clocks.
`timescale 1ps/1ps
module tb_serializer_10to1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] word_in = '0;
  logic word_take, out;
  int checks = 0, failures = 0;

  serializer_10to1 dut (.clk, .rst_n, .word_in, .word_take, .out);

  always #200 clk = ~clk;

  // expected[t] is the bit that must be on out after clock edge t.
  logic exp_bit [0:8191];
  bit   exp_set [0:8191];
  int   edge_n = 0, last_take = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      // out as seen here was produced by the previous edge.
      if (edge_n > 0 && exp_set[edge_n - 1]) begin
        checks++;
        if (out !== exp_bit[edge_n - 1]) begin
          failures++;
          if (failures < 10) $display("FAIL edge %0d out=%b exp=%b", edge_n - 1, out, exp_bit[edge_n - 1]);
        end
      end
      if (word_take) begin
        for (int i = 0; i < 10; i++) begin
          exp_bit[edge_n + 6 + i] = word_in[i];
          exp_set[edge_n + 6 + i] = 1'b1;
        end
        if (last_take >= 0) begin
          checks++;
          if (edge_n - last_take != 10) begin
            failures++;
            $display("FAIL word_take spacing %0d", edge_n - last_take);
          end
        end
        last_take = edge_n;
        word_in <= 10'($urandom);
      end
      edge_n++;
    end
  end

  initial begin
    for (int i = 0; i < 8192; i++) exp_set[i] = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (edge_n == 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
