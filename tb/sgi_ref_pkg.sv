// sgi_ref_pkg: reference models used by the transmitter and link testbenches.
//   prbs_next : advances a PRBS15 (x^15 + x^14 + 1) word by 16 bits, bit by bit
//   ref_enc   : segmented group-inversion encoding written from the coding
//               rule (invert a group when that gives the smaller running
//               disparity, keep it on a tie), returning {dummy, word}
package sgi_ref_pkg;

  function automatic logic [15:0] prbs_next(logic [15:0] w);
    logic [15:0] h = w;
    for (int k = 0; k < 16; k++) h = {h[14:0], h[14] ^ h[13]};
    return h;
  endfunction

  function automatic int disp_of(logic [3:0] v, int n);
    int o = 0;
    for (int i = 0; i < n; i++) o += int'(v[i]);
    return 2 * o - n;
  endfunction

  function automatic logic [21:0] ref_enc(logic [15:0] x);
    int          acc, g, a1, a2;
    logic [3:0]  grp [4:1];
    int          w   [4:1];
    logic [4:1]  f;
    logic [19:0] r;
    int          ones;
    logic [1:0]  dm;
    grp[4] = x[11:8]; grp[3] = x[7:4]; grp[2] = {2'b0, x[3:2]}; grp[1] = {2'b0, x[1:0]};
    w[4] = 4; w[3] = 4; w[2] = 2; w[1] = 2;
    acc = disp_of(x[15:12], 4);
    for (int k = 4; k >= 1; k--) begin
      g  = disp_of(grp[k], w[k]) - 1;        // flag 0 counted as a ZERO
      a1 = acc - g; a2 = acc + g;
      if (a1 < 0) a1 = -a1;
      if (a2 < 0) a2 = -a2;
      f[k] = a1 < a2;
      acc  = f[k] ? acc - g : acc + g;
    end
    // line order: g5, g4, f4, g3, f3, g2, f2, g1, f1
    r = {x[15:12], x[11:8] ^ {4{f[4]}}, f[4], x[7:4] ^ {4{f[3]}}, f[3],
         x[3:2] ^ {2{f[2]}}, f[2], x[1:0] ^ {2{f[1]}}, f[1]};
    ones = $countones(r);
    dm = (ones == 9) ? 2'b11 : (ones == 10) ? 2'b01 : 2'b00;
    return {dm, r};
  endfunction

endpackage
