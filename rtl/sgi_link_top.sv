// sgi_link_top: both ends of the segmented group-inversion parallel link.
//
// The transmitter chip (sgi_tx) generates PRBS data, encodes it 16-to-20
// bits in four interleaved lanes and serializes the 20 line bits plus two
// dummy bits onto its outputs. Beside it stands the receiver-side decoder
// (sgi_decoder), with its own ports: a receiver that has sliced and
// deserialized one 20-bit word presents it on rx_word and gets the 16 data
// bits back on rx_data in the same cycle. The analog parts (drivers,
// termination, channel, receiver comparators) are not part of this RTL;
// tx_line/tx_dummy are the drivers' logic inputs.
module sgi_link_top
  import sgi_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  output sgi_word_t          tx_line,
  output logic [DUMMY_W-1:0] tx_dummy,
  output logic [3:0]         tx_phi,
  output logic               tx_line_valid,
  input  sgi_word_t          rx_word,
  output logic [DATA_W-1:0]  rx_data
);

  sgi_tx u_tx (
    .clk, .rst_n, .line(tx_line), .dummy(tx_dummy), .phi(tx_phi),
    .line_valid(tx_line_valid)
  );

  sgi_decoder u_dec (.word(rx_word), .d(rx_data));

endmodule
