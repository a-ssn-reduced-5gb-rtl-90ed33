// tb_sgi_tx: runs the transmitter for 2000 bit slots from reset and checks
//   - line_valid rises on the third clock edge after reset is released,
//   - every valid slot carries the next word of lane (slot mod 4), lane k
//     sending its own PRBS sequence from its seed, encoded as the reference
//     encoder does (line and dummy bits),
//   - 9..11 ONEs on the 20 line bits and exactly 11 on all 22 outputs,
//   - each phi output rises once every four slots.
// It also counts that every mechanism occurs: inversion of each of G4..G1,
// each dummy setting (00, 01, 11) and each lane.
module tb_sgi_tx;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int SLOTS = 2000;
  localparam logic [63:0] SEEDS = {16'h5A3D, 16'h4F0F, 16'h1234, 16'h8001};

  logic       clk = 1'b0, rst_n = 1'b0;
  sgi_word_t  line;
  logic [1:0] dummy;
  logic [3:0] phi, phi_prev;
  logic       line_valid;

  logic [15:0] lane_word [4];
  int          inv [1:4]   = '{default: 0};
  int          dm_seen [4] = '{default: 0};
  int          lane_seen [4] = '{default: 0};
  int          phi_rises [4] = '{default: 0};

  sgi_tx dut (.clk, .rst_n, .line, .dummy, .phi, .line_valid);

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
    phi_prev = phi;
    // latency to the first valid slot
    edges = 0;
    while (!line_valid && edges < 10) begin
      @(posedge clk);
      #1;
      edges++;
    end
    checks++;
    if (edges != 3) begin failures++; $display("line_valid after %0d edges", edges); end
    for (int n = 0; n < SLOTS; n++) begin
      int k;
      k = n % 4;
      e = ref_enc(lane_word[k]);
      checks += 3;
      if (!line_valid) failures++;
      if ({dummy, line} !== e) begin
        failures++;
        if (failures < 10) $display("slot %0d lane %0d line=%b dummy=%b exp %b", n, k, line, dummy, e);
      end
      if ($countones(line) < 9 || $countones(line) > 11 || $countones({dummy, line}) != 11)
        failures++;
      if (line.f4) inv[4]++;
      if (line.f3) inv[3]++;
      if (line.f2) inv[2]++;
      if (line.f1) inv[1]++;
      dm_seen[dummy]++;
      lane_seen[k]++;
      lane_word[k] = prbs_next(lane_word[k]);
      @(posedge clk);
      #1;
      for (int j = 0; j < 4; j++) if (phi[j] && !phi_prev[j]) phi_rises[j]++;
      phi_prev = phi;
    end
    for (int j = 0; j < 4; j++) begin
      checks += 2;
      if (phi_rises[j] < SLOTS / 4 - 1 || phi_rises[j] > SLOTS / 4) begin
        failures++; $display("phi%0d rose %0d times", j, phi_rises[j]);
      end
      if (lane_seen[j] == 0) failures++;
    end
    for (int j = 1; j <= 4; j++) begin
      checks++;
      if (inv[j] == 0) begin failures++; $display("G%0d never inverted", j); end
    end
    checks += 3;
    if (dm_seen[0] == 0) failures++;
    if (dm_seen[1] == 0) failures++;
    if (dm_seen[3] == 0) failures++;
    $display("inversions G4..G1: %0d %0d %0d %0d; dummy 00/01/11: %0d %0d %0d",
             inv[4], inv[3], inv[2], inv[1], dm_seen[0], dm_seen[1], dm_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
