// sgi_pkg: types and helper functions shared by the segmented group-inversion
// (SGI) encoder, its decoder and the transmitter.
//
// A 16-bit word D[15:0] is split into five groups:
//   G5 = D[15:12] (4 bits, never inverted, no flag)
//   G4 = D[11:8] + flag f4,  G3 = D[7:4] + flag f3,
//   G2 = D[3:2]  + flag f2,  G1 = D[1:0] + flag f1.
// The 20 line bits are ordered as sgi_word_t below (G5 first, f1 last).
//
// Disparity codes. A disparity (a, b) means "majority bit a exceeds the other
// bit by b". It is carried as {maj, idx}: maj is the majority bit (0 also for
// a perfect balance) and idx the magnitude index, b = 2*idx for a set of even
// disparities and b = 2*idx + 1 for a set of odd disparities. Five cases fit
// in a 3-bit code, three or four cases in a 2-bit code. This mapping (MSB =
// majority bit) follows the paper's description; the exact low-bit mapping is
// this design's choice.
package sgi_pkg;

  localparam int unsigned DATA_W  = 16;  // raw word
  localparam int unsigned LINE_W  = 20;  // encoded word incl. 4 flags
  localparam int unsigned DUMMY_W = 2;   // dummy balancing outputs
  localparam int unsigned LANES   = 4;   // time-interleave factor

  typedef struct packed {
    logic [3:0] g5;
    logic [3:0] g4;
    logic       f4;
    logic [3:0] g3;
    logic       f3;
    logic [1:0] g2;
    logic       f2;
    logic [1:0] g1;
    logic       f1;
  } sgi_word_t;

  // Signed disparity (ones minus zeros) of a code of width W.
  function automatic int code_to_disp(input logic [2:0] code, input int unsigned w,
                                      input bit odd);
    int mag;
    logic maj;
    if (w == 3) begin
      maj = code[2];
      mag = 2 * int'(code[1:0]);
    end else begin
      maj = code[1];
      mag = 2 * int'(code[0]);
    end
    if (odd) mag = mag + 1;
    return maj ? mag : -mag;
  endfunction

  // Code of width W for a signed disparity d of the given parity.
  function automatic logic [2:0] disp_to_code(input int d, input int unsigned w,
                                              input bit odd);
    int mag;
    logic [1:0] idx;
    logic maj;
    maj = (d > 0);
    mag = (d < 0) ? -d : d;
    idx = 2'(odd ? (mag - 1) / 2 : mag / 2);
    if (w == 3) return {maj, idx};
    else        return {1'b0, maj, idx[0]};
  endfunction

endpackage
