// tb_sgi_encoder: all 65536 input words through the encoder, one per clock,
// then a few cycles with en low. For every word it checks:
//   - the encoded word and flags against a reference that, from G5 down to
//     G1, inverts a group exactly when that gives the smaller running
//     disparity (keeping it on a tie),
//   - that the 20 line bits hold 9, 10 or 11 ONEs and that the 22 outputs
//     (line + dummy) hold exactly 11,
//   - that XOR decoding gives back the input,
//   - the one-cycle latency and the hold while en is low,
// plus rows of the paper's encoding tables as fixed cases.
module tb_sgi_encoder;
  import sgi_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] d = '0;
  sgi_word_t   word;
  logic [1:0]  dummy;
  int          hist_ones [9:11] = '{default: 0};
  int          inv_count [1:4]  = '{default: 0};

  sgi_encoder dut (.clk, .rst_n, .en, .d, .word, .dummy);

  always #5 clk = ~clk;

  function automatic int disp(logic [3:0] v, int n);
    int o = 0;
    for (int i = 0; i < n; i++) o += int'(v[i]);
    return 2 * o - n;
  endfunction

  function automatic int absv(int v);
    return v < 0 ? -v : v;
  endfunction

  // reference encoder: returns {word, dummy}
  function automatic logic [21:0] ref_enc(logic [15:0] x);
    int         acc, g;
    logic [3:0] grp [4:1];
    int         w   [4:1];
    logic [4:1] f;
    sgi_word_t  r;
    int         ones;
    logic [1:0] dm;
    grp[4] = x[11:8]; grp[3] = x[7:4]; grp[2] = {2'b0, x[3:2]}; grp[1] = {2'b0, x[1:0]};
    w[4] = 4; w[3] = 4; w[2] = 2; w[1] = 2;
    acc = disp(x[15:12], 4);
    for (int k = 4; k >= 1; k--) begin
      g    = disp(grp[k], w[k]) - 1;         // flag 0 counted as a ZERO
      f[k] = absv(acc - g) < absv(acc + g);
      acc  = f[k] ? acc - g : acc + g;
    end
    r.g5 = x[15:12];
    r.g4 = x[11:8] ^ {4{f[4]}}; r.f4 = f[4];
    r.g3 = x[7:4]  ^ {4{f[3]}}; r.f3 = f[3];
    r.g2 = x[3:2]  ^ {2{f[2]}}; r.f2 = f[2];
    r.g1 = x[1:0]  ^ {2{f[1]}}; r.f1 = f[1];
    ones = $countones(r);
    dm = (ones == 9) ? 2'b11 : (ones == 10) ? 2'b01 : 2'b00;
    return {dm, r};
  endfunction

  task automatic check_out(logic [15:0] x);
    logic [21:0] e;
    int          ones;
    logic [15:0] dec;
    e    = ref_enc(x);
    ones = $countones(word);
    dec  = {word.g5, word.g4 ^ {4{word.f4}}, word.g3 ^ {4{word.f3}},
            word.g2 ^ {2{word.f2}}, word.g1 ^ {2{word.f1}}};
    checks += 4;
    if (word !== e[19:0]) begin
      failures++;
      if (failures < 10) $display("d=%h word=%b exp %b", x, word, e[19:0]);
    end
    if (dummy !== e[21:20]) failures++;
    if (ones < 9 || ones > 11 || $countones({dummy, word}) != 11) begin
      failures++; $display("d=%h ones=%0d", x, ones);
    end else hist_ones[ones]++;
    if (dec !== x) failures++;
    if (word.f4) inv_count[4]++;
    if (word.f3) inv_count[3]++;
    if (word.f2) inv_count[2]++;
    if (word.f1) inv_count[1]++;
  endtask

  // one row of the paper's tables: input word, expected encoded G4..G1 with flags
  task automatic table_row(logic [15:0] x, logic [15:0] exp_groups, logic [4:1] exp_f);
    en = 1'b1; d = x;
    @(posedge clk);
    #1;
    checks++;
    if ({word.g4, word.g3, word.g2, word.g1} !== exp_groups[11:0] ||
        word.g5 !== x[15:12] ||
        {word.f4, word.f3, word.f2, word.f1} !== exp_f) begin
      failures++; $display("table row d=%h word=%b", x, word);
    end
  endtask

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 16'hFFFF; en = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (word !== '0 || dummy !== '0) failures++;
    rst_n = 1'b1;
    // latency: output follows the input of the previous edge
    for (int v = 0; v < 65536; v++) begin
      d = 16'(v);
      @(posedge clk);
      #1;
      check_out(16'(v));
    end
    // hold while en is low
    en = 1'b0;
    for (int i = 0; i < 8; i++) begin
      d = 16'($urandom);
      @(posedge clk);
      #1;
      check_out(16'hFFFF);
    end
    // paths through the paper's encoding tables, worked out by hand:
    // G5=0000 G4=0000 G3=0111 G2=11 G1=11 -> 1111/1 1000/1 11/0 00/1
    table_row(16'h007F, 16'h0F8C, 4'b1101);
    // G5=0011 G4=0000 G3=0000 G2=01 G1=01 -> 0000/0 1111/1 01/0 10/1
    table_row(16'h3005, 16'h00F6, 4'b0101);
    // G5=0111 G4=0111 G3=1111 G2=00 G1=01 -> 1000/1 0000/1 11/1 01/0
    table_row(16'h77F1, 16'h080D, 4'b1110);
    $display("hist ones 9/10/11: %0d %0d %0d, inversions f4..f1: %0d %0d %0d %0d",
             hist_ones[9], hist_ones[10], hist_ones[11],
             inv_count[4], inv_count[3], inv_count[2], inv_count[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
