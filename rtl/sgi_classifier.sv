// sgi_classifier: disparity classification block (C1..C5 of the encoder).
//
// Counts the ONEs of one data group and returns its disparity as a compact
// code {maj, idx} (see sgi_pkg). For groups that carry a flag (HAS_FLAG=1,
// blocks C1..C4) the flag's initial value 0 is counted as one more ZERO, as
// the paper prescribes, so a 4-bit group falls in the five odd cases
// (0,5),(0,3),(0,1),(1,1),(1,3) and a 2-bit group in (0,3),(0,1),(1,1).
// Without a flag (C5) a 4-bit group falls in the five even cases
// (0,4),(0,2),(0,0),(1,2),(1,4). 4-bit groups give a 3-bit code, 2-bit groups
// a 2-bit code, matching the bus widths printed in the encoder diagram.
// Purely combinational. The counting circuit itself is this design's choice.
module sgi_classifier
  import sgi_pkg::*;
#(
  parameter int unsigned DW       = 4,               // data bits in the group
  parameter bit          HAS_FLAG = 1'b1,            // count a 0-valued flag
  parameter int unsigned CW       = (DW > 2) ? 3 : 2 // code width
) (
  input  logic [DW-1:0] d,
  output logic [CW-1:0] code
);

  localparam int unsigned TOTAL = DW + (HAS_FLAG ? 1 : 0);
  localparam bit          ODD   = (TOTAL % 2) == 1;

  logic [2:0] code_full;
  int         ones;
  int         disp;

  always_comb begin
    ones = 0;
    for (int i = 0; i < DW; i++) ones += int'(d[i]);
    disp      = 2 * ones - int'(TOTAL);
    code_full = disp_to_code(disp, CW, ODD);
    code      = code_full[CW-1:0];
  end

endmodule
