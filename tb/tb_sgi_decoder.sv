// tb_sgi_decoder: every group pattern with every flag value, checked against
// the rule "data bit = received bit XOR its group's flag" (G5 unchanged).
module tb_sgi_decoder;
  import sgi_pkg::*;
  int checks = 0, failures = 0;
  sgi_word_t         word;
  logic [DATA_W-1:0] d, exp_d;

  sgi_decoder dut (.word, .d);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      word = sgi_word_t'($urandom);
      #1;
      for (int b = 0; b < 16; b++) begin
        logic fl;
        if (b >= 12)     fl = 1'b0;
        else if (b >= 8) fl = word.f4;
        else if (b >= 4) fl = word.f3;
        else if (b >= 2) fl = word.f2;
        else             fl = word.f1;
        exp_d[b] = word[b < 12 ? (b < 8 ? (b < 4 ? (b < 2 ? b + 1 : b + 2) : b + 3) : b + 4) : b + 4] ^ fl;
      end
      checks++;
      if (d !== exp_d) begin
        failures++; $display("word=%b d=%h exp %h", word, d, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
