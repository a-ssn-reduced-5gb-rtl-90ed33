// sgi_encoder: 16-bit to 20-bit segmented group-inversion encoder.
//
// The 16 input bits are split into five groups (see sgi_pkg). Classifiers
// C5..C1 compute each group's disparity, then the flag units F4..F1 decide,
// from G5 down to G1, whether to invert each group so that the running
// disparity of the encoded bits is pulled back towards zero. G5 is sent as
// it is. Finally each group is XORed with its flag and registered (blocks E;
// G5 through a plain flip-flop). On the line the 20 bits then hold 10 or 11
// ONEs, or 9 (difference of 0 or 2 between ZEROs and ONEs).
//
// The encoder also drives the two dummy outputs that feed the replica
// multiplexers and drivers: they carry 2, 1 or 0 ONEs so that the 22 outputs
// always hold exactly 11 ONEs. The paper gives the target (11 of 22); the
// dummy bits are derived here from the final disparity left by F1
// ((0,2) -> 11, (0,0) -> 01, (1,2) -> 00), which is this design's choice.
//
// Interface: d is sampled on a rising clk edge with en high; word and dummy
// are valid from that edge on (one-cycle latency) and held while en is low.
// Synchronous active-low reset clears the outputs to all zero.
module sgi_encoder
  import sgi_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [DATA_W-1:0]  d,
  output sgi_word_t          word,
  output logic [DUMMY_W-1:0] dummy
);

  // classification codes
  logic [2:0] c5, c4, c3;
  logic [1:0] c2, c1;
  // accumulated disparity codes between flag units
  logic [2:0] a4, a3;
  logic [1:0] a2, a1;
  logic       f4, f3, f2, f1;

  sgi_classifier #(.DW(4), .HAS_FLAG(1'b0)) u_c5 (.d(d[15:12]), .code(c5));
  sgi_classifier #(.DW(4), .HAS_FLAG(1'b1)) u_c4 (.d(d[11:8]),  .code(c4));
  sgi_classifier #(.DW(4), .HAS_FLAG(1'b1)) u_c3 (.d(d[7:4]),   .code(c3));
  sgi_classifier #(.DW(2), .HAS_FLAG(1'b1)) u_c2 (.d(d[3:2]),   .code(c2));
  sgi_classifier #(.DW(2), .HAS_FLAG(1'b1)) u_c1 (.d(d[1:0]),   .code(c1));

  // G5 (even) + G4 (odd) -> odd, five cases
  sgi_flag_unit #(.IN_W(3), .IN_ODD(1'b0), .G_W(3), .OUT_W(3)) u_f4 (
    .acc_in(c5), .grp(c4), .flag(f4), .acc_out(a4));
  // odd + G3 (odd) -> even, five cases
  sgi_flag_unit #(.IN_W(3), .IN_ODD(1'b1), .G_W(3), .OUT_W(3)) u_f3 (
    .acc_in(a4), .grp(c3), .flag(f3), .acc_out(a3));
  // even + G2 (odd) -> odd, four cases
  sgi_flag_unit #(.IN_W(3), .IN_ODD(1'b0), .G_W(2), .OUT_W(2)) u_f2 (
    .acc_in(a3), .grp(c2), .flag(f2), .acc_out(a2));
  // odd + G1 (odd) -> even, three cases: (0,0), (0,2), (1,2)
  sgi_flag_unit #(.IN_W(2), .IN_ODD(1'b1), .G_W(2), .OUT_W(2)) u_f1 (
    .acc_in(a2), .grp(c1), .flag(f1), .acc_out(a1));

  // G5 flip-flop (F/F in the diagram)
  always_ff @(posedge clk) begin
    if (!rst_n)  word.g5 <= '0;
    else if (en) word.g5 <= d[15:12];
  end

  sgi_invert_reg #(.W(4)) u_e4 (.clk, .rst_n, .en, .d(d[11:8]), .flag(f4),
                                .q(word.g4), .flag_q(word.f4));
  sgi_invert_reg #(.W(4)) u_e3 (.clk, .rst_n, .en, .d(d[7:4]),  .flag(f3),
                                .q(word.g3), .flag_q(word.f3));
  sgi_invert_reg #(.W(2)) u_e2 (.clk, .rst_n, .en, .d(d[3:2]),  .flag(f2),
                                .q(word.g2), .flag_q(word.f2));
  sgi_invert_reg #(.W(2)) u_e1 (.clk, .rst_n, .en, .d(d[1:0]),  .flag(f1),
                                .q(word.g1), .flag_q(word.f1));

  // dummy outputs: top up the ONEs of the 20 line bits to 11
  logic [DUMMY_W-1:0] dummy_d;
  always_comb begin
    unique case (a1)
      2'b01:   dummy_d = 2'b11; // (0,2): 9 ONEs on the line
      2'b11:   dummy_d = 2'b00; // (1,2): 11 ONEs on the line
      default: dummy_d = 2'b01; // (0,0): 10 ONEs on the line
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  dummy <= '0;
    else if (en) dummy <= dummy_d;
  end

endmodule
