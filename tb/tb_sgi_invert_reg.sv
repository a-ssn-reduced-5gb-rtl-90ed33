// tb_sgi_invert_reg: random check of the XOR-and-register block: reset value,
// one-cycle latency with en high, inversion by the flag, hold with en low.
module tb_sgi_invert_reg;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0, flag = 1'b0;
  logic [3:0] d = '0, q;
  logic       flag_q;
  logic [3:0] exp_q;
  logic       exp_f;

  sgi_invert_reg #(.W(4)) dut (.clk, .rst_n, .en, .d, .flag, .q, .flag_q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 4'b0 || flag_q !== 1'b0) failures++;
    rst_n = 1'b1;
    exp_q = '0; exp_f = 1'b0;
    for (int i = 0; i < 500; i++) begin
      d = 4'($urandom); flag = 1'($urandom); en = ($urandom % 4) != 0;
      if (en) begin
        exp_q = d ^ {4{flag}}; exp_f = flag;
      end
      @(posedge clk);
      #1;
      checks++;
      if (q !== exp_q || flag_q !== exp_f) begin
        failures++; $display("i=%0d q=%b exp %b f=%b exp %b", i, q, exp_q, flag_q, exp_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
