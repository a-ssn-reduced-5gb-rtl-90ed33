// tb_sgi_link_top: end-to-end run of the link at its default parameters.
// The transmitter sends one complete PRBS15 period on every lane
// (32767 words per lane, 131068 bit slots); each slot's 20 line bits are
// looped back into the receiver-side decoder. Checks per slot:
//   - line and dummy bits equal the reference encoding of the expected word
//     of lane (slot mod 4),
//   - the decoder returns that word,
//   - 9..11 ONEs on the line, exactly 11 on line + dummy (constant current),
// and at the end: line_valid latency of three edges, every lane back at its
// seed after the full period, and that each mechanism happened: inversion of
// each of G4..G1, each dummy setting (00, 01, 11) and each ONE count
// (9, 10, 11) on the line.
module tb_sgi_link_top;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int WORDS = 32767;              // PRBS15 period in 16-bit words
  localparam int SLOTS = 4 * WORDS;
  localparam logic [63:0] SEEDS = {16'h5A3D, 16'h4F0F, 16'h1234, 16'h8001};

  logic        clk = 1'b0, rst_n = 1'b0;
  sgi_word_t   tx_line, rx_word;
  logic [1:0]  tx_dummy;
  logic [3:0]  tx_phi;
  logic        tx_line_valid;
  logic [15:0] rx_data;

  logic [15:0] lane_word [4];
  int          inv [1:4]   = '{default: 0};
  int          dm_seen [4] = '{default: 0};
  int          ones_seen [9:11] = '{default: 0};

  sgi_link_top dut (.clk, .rst_n, .tx_line, .tx_dummy, .tx_phi, .tx_line_valid,
                    .rx_word, .rx_data);

  assign rx_word = tx_line;   // ideal channel

  always #5 clk = ~clk;

  initial begin
    repeat (SLOTS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] e;
    int          edges;
    for (int k = 0; k < 4; k++) lane_word[k] = SEEDS[k*16 +: 16];
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    edges = 0;
    while (!tx_line_valid && edges < 10) begin
      @(posedge clk);
      #1;
      edges++;
    end
    checks++;
    if (edges != 3) begin failures++; $display("line_valid after %0d edges", edges); end
    for (int n = 0; n < SLOTS; n++) begin
      int k;
      int ones;
      k = n % 4;
      e = ref_enc(lane_word[k]);
      ones = $countones(tx_line);
      checks += 4;
      if (!tx_line_valid) failures++;
      if ({tx_dummy, tx_line} !== e) begin
        failures++;
        if (failures < 10) $display("slot %0d lane %0d line=%b exp %b", n, k, tx_line, e[19:0]);
      end
      if (rx_data !== lane_word[k]) begin
        failures++;
        if (failures < 10) $display("slot %0d rx_data=%h exp %h", n, rx_data, lane_word[k]);
      end
      if (ones < 9 || ones > 11 || $countones({tx_dummy, tx_line}) != 11) failures++;
      else ones_seen[ones]++;
      if (tx_line.f4) inv[4]++;
      if (tx_line.f3) inv[3]++;
      if (tx_line.f2) inv[2]++;
      if (tx_line.f1) inv[1]++;
      dm_seen[tx_dummy]++;
      lane_word[k] = prbs_next(lane_word[k]);
      @(posedge clk);
      #1;
    end
    // one full period: every lane's next word is its seed again
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (lane_word[k] !== SEEDS[k*16 +: 16]) failures++;
    end
    for (int j = 1; j <= 4; j++) begin
      checks++;
      if (inv[j] == 0) begin failures++; $display("G%0d never inverted", j); end
    end
    checks += 6;
    if (dm_seen[0] == 0) failures++;
    if (dm_seen[1] == 0) failures++;
    if (dm_seen[3] == 0) failures++;
    if (ones_seen[9] == 0) failures++;
    if (ones_seen[10] == 0) failures++;
    if (ones_seen[11] == 0) failures++;
    $display("slots %0d; inversions G4..G1: %0d %0d %0d %0d; dummy 00/01/11: %0d %0d %0d",
             SLOTS, inv[4], inv[3], inv[2], inv[1], dm_seen[0], dm_seen[1], dm_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
