// tb_prbs16: compares the 16-bit words with a bit-serial PRBS15 model
// (b[n] = b[n-15] ^ b[n-14]) seeded from the reset word, checks that en low
// holds the word, and that the sequence repeats after exactly 32767 words
// (the period 2^15-1 is odd, so 32767 words of 16 bits return to the seed).
module tb_prbs16;
  int checks = 0, failures = 0;
  localparam logic [15:0] SEED = 16'hACE1;
  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] data;
  logic [15:0] hist;   // model: last 16 bits, bit 0 newest
  int          steps = 0;

  prbs16 #(.SEED(SEED)) dut (.clk, .rst_n, .en, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (data !== SEED) failures++;
    rst_n = 1'b1;
    hist  = SEED;
    for (int i = 0; i < 32767; i++) begin
      en = (i % 7) != 3;
      if (en) begin
        steps++;
        for (int k = 0; k < 16; k++) hist = {hist[14:0], hist[14] ^ hist[13]};
      end
      @(posedge clk);
      #1;
      checks++;
      if (data !== hist) begin
        failures++;
        if (failures < 10) $display("i=%0d data=%h exp %h", i, data, hist);
      end
    end
    // finish the period with en held high and check it returns to the seed
    en = 1'b1;
    while (1) begin
      @(posedge clk);
      #1;
      steps++;
      if (data == SEED) break;
    end
    checks++;
    if (steps != 32767) begin
      failures++; $display("period %0d words", steps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
