// tb_sgi_flag_unit: exhaustive check of the four flag-unit configurations of
// the encoder (F4, F3, F2, F1) over every reachable pair of accumulated and
// group disparity. The expected flag is the choice that gives the smaller
// running disparity, keeping the group when both are equal; the expected
// accumulated code comes from hand-written code tables.
module tb_sgi_flag_unit;
  int checks = 0, failures = 0;

  // code tables: value (ones minus zeros) of each code
  localparam int NE3 = 5;
  localparam logic [2:0] EVEN3_C [NE3] = '{3'b010, 3'b001, 3'b000, 3'b101, 3'b110};
  localparam int         EVEN3_V [NE3] = '{-4, -2, 0, 2, 4};
  localparam logic [2:0] ODD3_C  [NE3] = '{3'b010, 3'b001, 3'b000, 3'b100, 3'b101};
  localparam int         ODD3_V  [NE3] = '{-5, -3, -1, 1, 3};
  localparam logic [1:0] ODD2_C  [4]   = '{2'b01, 2'b00, 2'b10, 2'b11};
  localparam int         ODD2_V  [4]   = '{-3, -1, 1, 3};
  localparam logic [1:0] EVEN2_C [3]   = '{2'b01, 2'b00, 2'b11};
  localparam int         EVEN2_V [3]   = '{-2, 0, 2};

  logic [2:0] a4_in, g4, a4_out;  logic f4;
  logic [2:0] a3_in, g3, a3_out;  logic f3;
  logic [2:0] a2_in;  logic [1:0] g2, a2_out; logic f2;
  logic [1:0] a1_in, g1, a1_out;  logic f1;

  sgi_flag_unit #(.IN_W(3), .IN_ODD(1'b0), .G_W(3), .OUT_W(3)) u_f4 (
    .acc_in(a4_in), .grp(g4), .flag(f4), .acc_out(a4_out));
  sgi_flag_unit #(.IN_W(3), .IN_ODD(1'b1), .G_W(3), .OUT_W(3)) u_f3 (
    .acc_in(a3_in), .grp(g3), .flag(f3), .acc_out(a3_out));
  sgi_flag_unit #(.IN_W(3), .IN_ODD(1'b0), .G_W(2), .OUT_W(2)) u_f2 (
    .acc_in(a2_in), .grp(g2), .flag(f2), .acc_out(a2_out));
  sgi_flag_unit #(.IN_W(2), .IN_ODD(1'b1), .G_W(2), .OUT_W(2)) u_f1 (
    .acc_in(a1_in), .grp(g1), .flag(f1), .acc_out(a1_out));

  function automatic int absv(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic bit exp_flag(int acc, int g);
    return absv(acc - g) < absv(acc + g);
  endfunction

  function automatic logic [2:0] code_of(int v, bit odd, int w);
    if (w == 3) begin
      for (int i = 0; i < NE3; i++) begin
        if (!odd && EVEN3_V[i] == v) return EVEN3_C[i];
        if (odd && ODD3_V[i] == v) return ODD3_C[i];
      end
    end else begin
      for (int i = 0; i < 4; i++) if (odd && ODD2_V[i] == v) return {1'b0, ODD2_C[i]};
      for (int i = 0; i < 3; i++) if (!odd && EVEN2_V[i] == v) return {1'b0, EVEN2_C[i]};
    end
    return 3'b111; // not representable: will not match
  endfunction

  task automatic check(string name, logic flag, logic [2:0] acc_out, int acc, int g,
                       bit odd_out, int w);
    bit   ef;
    int   nv;
    ef = exp_flag(acc, g);
    nv = ef ? acc - g : acc + g;
    checks += 2;
    if (flag !== ef) begin
      failures++; $display("%s acc=%0d g=%0d flag=%b", name, acc, g, flag);
    end
    if (acc_out !== code_of(nv, odd_out, w)) begin
      failures++; $display("%s acc=%0d g=%0d acc_out=%b exp %0d", name, acc, g, acc_out, nv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // F4: acc from G5 (even, 3 bits), group 4+flag (odd, 3 bits)
    for (int i = 0; i < NE3; i++)
      for (int j = 0; j < NE3; j++) begin
        a4_in = EVEN3_C[i]; g4 = ODD3_C[j]; #1;
        check("F4", f4, a4_out, EVEN3_V[i], ODD3_V[j], 1'b1, 3);
      end
    // F3: acc odd 3 bits, group odd 3 bits -> even
    for (int i = 0; i < NE3; i++)
      for (int j = 0; j < NE3; j++) begin
        a3_in = ODD3_C[i]; g3 = ODD3_C[j]; #1;
        check("F3", f3, a3_out, ODD3_V[i], ODD3_V[j], 1'b0, 3);
      end
    // F2: acc even 3 bits, group 2+flag (odd, 2 bits: -3,-1,1) -> odd 2 bits
    for (int i = 0; i < NE3; i++)
      for (int j = 0; j < 3; j++) begin
        a2_in = EVEN3_C[i]; g2 = ODD2_C[j]; #1;
        check("F2", f2, {1'b0, a2_out}, EVEN3_V[i], ODD2_V[j], 1'b1, 2);
      end
    // F1: acc odd 2 bits (4 cases), group odd 2 bits -> even 2 bits
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 3; j++) begin
        a1_in = ODD2_C[i]; g1 = ODD2_C[j]; #1;
        check("F1", f1, {1'b0, a1_out}, ODD2_V[i], ODD2_V[j], 1'b0, 2);
      end
    // two rows of the paper's G4 table: G5=0000 (0,4) with G4=0000 (0,5)
    // is inverted; G5=0011 (0,0) with G4=0111 (1,1) is kept
    a4_in = 3'b010; g4 = 3'b010; #1; checks++; if (f4 !== 1'b1) failures++;
    a4_in = 3'b000; g4 = 3'b100; #1; checks++; if (f4 !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
