// tb_ser_mux4: random lane bits and selects; q must show d[sel] of the
// previous clock edge (one register stage), and 0 after reset.
module tb_ser_mux4;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] d = '0;
  logic [1:0] sel = '0;
  logic       q, exp_q;

  ser_mux4 dut (.clk, .rst_n, .d, .sel, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 4'hF;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      d = 4'($urandom); sel = 2'($urandom);
      exp_q = d[sel];
      @(posedge clk);
      #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("i=%0d q=%b exp %b", i, q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
