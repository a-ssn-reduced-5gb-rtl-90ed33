// sgi_tx: 5 Gb/s-class 20-pin parallel transmitter with segmented
// group-inversion coding and dummy current balancing.
//
// Four time-interleaved lanes each hold a 16-bit PRBS source and a
// 16-to-20-bit encoder (sgi_encoder) that also drives two dummy bits. Lane k
// is clocked on phase k of the four-phase timing (four_phase_gen). For every
// one of the 22 outputs (20 line pins, 2 dummy replicas) a 4-to-1
// serializing multiplexer (ser_mux4) sends the four lanes' bits in turn, so
// each pin runs at four times the lane rate. Every bit slot the 20 line
// pins carry one encoded word with 9 to 11 ONEs, and the 22 outputs together
// carry exactly 11 ONEs: the pull-down current of the drivers is constant,
// which removes the simultaneous switching noise on the driver supply.
//
// Timing (clk is the bit clock): lane k loads a new word on the clock edge
// ending slot k; the serializers register lane (phase+2) mod 4, so lane k's
// word appears on the pins for the slot two to three edges after its load,
// and consecutive slots carry lanes 0,1,2,3,0,... Each lane therefore sends
// its PRBS words in order, one every four slots. line_valid rises once the
// first encoded word has reached the pins and stays high until reset.
// The output drivers, termination and the shared current source are analog
// and lie outside this module: line and dummy are their logic inputs.
// Synchronous active-low reset.
module sgi_tx
  import sgi_pkg::*;
#(
  // PRBS seed of each lane (lane 0 in the lowest 16 bits); this design's
  // choice. A seed w that satisfies w[0] == w[15] ^ w[14] lies on the PRBS15
  // sequence, so the lane returns to it after one full period.
  parameter logic [LANES*16-1:0] SEEDS = {16'h5A3D, 16'h4F0F, 16'h1234, 16'h8001}
) (
  input  logic               clk,
  input  logic               rst_n,
  output sgi_word_t          line,
  output logic [DUMMY_W-1:0] dummy,
  output logic [3:0]         phi,
  output logic               line_valid
);

  localparam int unsigned OUTS = LINE_W + DUMMY_W; // 22 serialized outputs

  logic [1:0]        phase;
  logic [1:0]        mux_sel;
  logic [LANES-1:0]  lane_en;
  logic [OUTS-1:0]   lane_out [LANES];  // {dummy, word} of every lane
  logic [OUTS-1:0]   ser_q;

  four_phase_gen u_clkgen (
    .clk, .rst_n, .phase, .phi, .lane_en, .mux_sel
  );

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    logic [DATA_W-1:0]  prbs_data;
    sgi_word_t          enc_word;
    logic [DUMMY_W-1:0] enc_dummy;

    prbs16 #(.SEED(SEEDS[k*16 +: 16])) u_prbs (
      .clk, .rst_n, .en(lane_en[k]), .data(prbs_data)
    );

    sgi_encoder u_enc (
      .clk, .rst_n, .en(lane_en[k]), .d(prbs_data),
      .word(enc_word), .dummy(enc_dummy)
    );

    assign lane_out[k] = {enc_dummy, enc_word};
  end

  for (genvar j = 0; j < OUTS; j++) begin : g_pin
    logic [LANES-1:0] bits;
    for (genvar k = 0; k < LANES; k++) begin : g_bit
      assign bits[k] = lane_out[k][j];
    end
    ser_mux4 u_mux (.clk, .rst_n, .d(bits), .sel(mux_sel), .q(ser_q[j]));
  end

  assign line  = ser_q[LINE_W-1:0];
  assign dummy = ser_q[OUTS-1:LINE_W];

  always_ff @(posedge clk) begin
    if (!rst_n)           line_valid <= 1'b0;
    else if (phase == 2'd2) line_valid <= 1'b1;
  end

  // current balance: 11 of the 22 outputs are ONE in every valid slot
  a_balance: assert property (@(posedge clk) disable iff (!rst_n)
    line_valid |-> $countones(ser_q) == OUTS / 2);

endmodule
