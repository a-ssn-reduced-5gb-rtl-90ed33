// tb_sgi_classifier: exhaustive check of the three classifier shapes used by
// the encoder (4 bits without flag, 4 bits with flag, 2 bits with flag)
// against hand-written tables of the disparity codes {maj, idx}.
module tb_sgi_classifier;
  int checks = 0, failures = 0;

  logic [3:0] d5, d4;
  logic [1:0] d1;
  logic [2:0] c5, c4;
  logic [1:0] c1;

  sgi_classifier #(.DW(4), .HAS_FLAG(1'b0)) u_c5 (.d(d5), .code(c5));
  sgi_classifier #(.DW(4), .HAS_FLAG(1'b1)) u_c4 (.d(d4), .code(c4));
  sgi_classifier #(.DW(2), .HAS_FLAG(1'b1)) u_c1 (.d(d1), .code(c1));

  // expected codes indexed by the number of ONEs in the data bits
  // even set: (0,4) (0,2) (0,0) (1,2) (1,4)
  localparam logic [2:0] EXP_EVEN [5] = '{3'b010, 3'b001, 3'b000, 3'b101, 3'b110};
  // odd set : (0,5) (0,3) (0,1) (1,1) (1,3)
  localparam logic [2:0] EXP_ODD4 [5] = '{3'b010, 3'b001, 3'b000, 3'b100, 3'b101};
  // 2-bit   : (0,3) (0,1) (1,1)
  localparam logic [1:0] EXP_ODD2 [3] = '{2'b01, 2'b00, 2'b10};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      d5 = 4'(v); d4 = 4'(v); d1 = 2'(v);
      #1;
      checks += 2;
      if (c5 !== EXP_EVEN[$countones(d5)]) begin
        failures++; $display("C5 d=%b code=%b", d5, c5);
      end
      if (c4 !== EXP_ODD4[$countones(d4)]) begin
        failures++; $display("C4 d=%b code=%b", d4, c4);
      end
      if (v < 4) begin
        checks++;
        if (c1 !== EXP_ODD2[$countones(d1)]) begin
          failures++; $display("C1 d=%b code=%b", d1, c1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
