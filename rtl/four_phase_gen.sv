// four_phase_gen: four-phase timing for the 4-way time-interleaved transmitter.
//
// The transmitter runs four lanes, each at a quarter of the bit rate, on
// phases phi0..phi3 spaced a quarter of their period apart. In this RTL
// the analog four-phase generator is replaced by its digital equivalent
// clocked at the bit rate: a 2-bit phase counter.
//   phase    : index of the current bit slot, 0,1,2,3,0,...
//   phi[k]   : 50%-duty quarter-rate phase k, high in slots k and k+1
//   lane_en  : one-hot, lane_en[k] high in slot k; lane k loads new data on
//              the bit-clock edge that ends slot k (the rising edge of
//              phi[k+1]), so lane_en[k] serves as lane k's clock enable
//   mux_sel  : lane picked by the 4-to-1 serializers, (phase + 2) mod 4, i.e.
//              each lane's word is sampled two slots after it was launched,
//              in the middle of its four-slot stable window
// Synchronous active-low reset starts at phase 0. Using a bit-rate clock and
// clock enables instead of four clocks is this design's choice.
module four_phase_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] phase,
  output logic [3:0] phi,
  output logic [3:0] lane_en,
  output logic [1:0] mux_sel
);

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= 2'd0;
    else        phase <= phase + 2'd1;
  end

  always_comb begin
    lane_en = 4'b0001 << phase;
    phi     = lane_en | {lane_en[0], lane_en[3:1]};
    mux_sel = phase + 2'd2;
  end

endmodule
