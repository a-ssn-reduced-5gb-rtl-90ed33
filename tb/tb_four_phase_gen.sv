// tb_four_phase_gen: checks after reset the slot sequence 0,1,2,3,..., the
// one-hot lane enables, the four 50%-duty phases each a quarter period
// apart, and the serializer select (phase + 2) mod 4.
module tb_four_phase_gen;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] phase, mux_sel;
  logic [3:0] phi, lane_en;
  int         rises [4] = '{default: 0};
  logic [3:0] phi_prev;

  four_phase_gen dut (.clk, .rst_n, .phase, .phi, .lane_en, .mux_sel);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    phi_prev = phi;
    for (int t = 0; t < 400; t++) begin
      int s;
      s = t % 4;
      checks += 4;
      if (phase !== 2'(s)) begin failures++; $display("t=%0d phase=%0d", t, phase); end
      if (lane_en !== 4'(1 << s)) failures++;
      if (mux_sel !== 2'((s + 2) % 4)) failures++;
      for (int k = 0; k < 4; k++) begin
        logic e;
        e = (s == k) || (s == (k + 1) % 4);
        if (phi[k] !== e) begin failures++; $display("t=%0d phi=%b", t, phi); break; end
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < 4; k++) if (phi[k] && !phi_prev[k]) rises[k]++;
      phi_prev = phi;
    end
    // every phase rises once per four slots
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (rises[k] != 100 && rises[k] != 99) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
