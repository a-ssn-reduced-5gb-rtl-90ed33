// sgi_decoder: receiver-side decoder of the segmented group-inversion code.
//
// Each received group is XORed with its own flag bit (one XOR gate per data
// bit, as the paper notes); G5 passes unchanged. Purely combinational:
// d = decode(word) in the same cycle. Registering the result is left to the
// receiver that uses it.
module sgi_decoder
  import sgi_pkg::*;
(
  input  sgi_word_t         word,
  output logic [DATA_W-1:0] d
);

  always_comb begin
    d[15:12] = word.g5;
    d[11:8]  = word.g4 ^ {4{word.f4}};
    d[7:4]   = word.g3 ^ {4{word.f3}};
    d[3:2]   = word.g2 ^ {2{word.f2}};
    d[1:0]   = word.g1 ^ {2{word.f1}};
  end

endmodule
