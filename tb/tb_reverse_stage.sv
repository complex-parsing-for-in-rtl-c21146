// tb_reverse_stage: checks byte reversal and 14-bit sample extraction of one
// 7-word group against samples read bit by bit from the wire bytes.
// Random groups with random word-valid patterns; the outputs must appear one
// cycle after in_valid. Two straddling samples are also checked against
// their word-level formulas, e.g. sample 9 = {word2[11:0], word1[63:62]}.
module tb_reverse_stage;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [6:0][63:0] in_word, out_word;
  logic [6:0] in_word_v, out_word_v;
  logic [31:0][15:0] out_adc;
  logic [31:0] out_adc_v;
  reverse_stage dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  byte unsigned b [56];
  initial begin
    in_valid = 0; in_word = '0; in_word_v = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int i = 0; i < 56; i++) b[i] = 8'($urandom);
      for (int w = 0; w < 7; w++)
        for (int i = 0; i < 8; i++) in_word[w][8*(7-i) +: 8] = b[8*w + i];
      in_word_v = (t < 100) ? 7'h7f : 7'($urandom);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "out_valid one cycle after in_valid");
      for (int w = 0; w < 7; w++) begin
        logic [63:0] le;
        for (int i = 0; i < 8; i++) le[8*i +: 8] = b[8*w + i];
        check(out_word[w] == le, $sformatf("word %0d reversed", w));
      end
      check(out_word_v == in_word_v, "word valid passed");
      // worked examples of straddling samples, from the reversed words
      check(out_adc[9] == {2'b00, out_word[2][11:0], out_word[1][63:62]}, "sample 9 = w2[11:0] : w1[63:62]");
      check(out_adc[4] == {2'b00, out_word[1][5:0], out_word[0][63:56]}, "sample 4 = w1[5:0] : w0[63:56]");
      for (int k = 0; k < 32; k++) begin
        int v;
        bit vv;
        v = 0;
        for (int j = 0; j < 14; j++) begin
          int bi;
          bi = 14 * k + j;
          v |= ((b[bi / 8] >> (bi % 8)) & 1) << j;
        end
        vv = in_word_v[(14 * k) / 64] && in_word_v[(14 * k + 13) / 64];
        check(out_adc[k] == 16'(v), $sformatf("sample %0d value %h exp %h", k, out_adc[k], v));
        check(out_adc_v[k] == vv, $sformatf("sample %0d valid", k));
      end
      @(negedge clk);
      check(!out_valid, "out_valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
