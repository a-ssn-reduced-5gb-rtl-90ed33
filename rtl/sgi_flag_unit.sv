// sgi_flag_unit: flag-computing block (F1..F4 of the encoder).
//
// Inputs are the disparity accumulated over the groups already encoded
// (acc_in, from C5 or from the previous flag unit) and the disparity of the
// next group with its flag at 0 (grp, from its classifier). The group is
// inverted (flag = 1) when the accumulated disparity is non-zero and the
// group has the same majority bit; inverting it then brings the running sum
// back towards zero. With a zero accumulated disparity both choices are
// equally good and the group is left as it is. acc_out is the accumulated
// disparity after this group: acc_in + grp, or acc_in - grp when inverted.
// The decision table reproduces the paper's encoding tables for G4..G1.
// Purely combinational; code widths follow the encoder diagram.
module sgi_flag_unit
  import sgi_pkg::*;
#(
  parameter int unsigned IN_W   = 3,    // width of acc_in code
  parameter bit          IN_ODD = 1'b0, // acc_in holds odd disparities
  parameter int unsigned G_W    = 3,    // width of group code (always odd)
  parameter int unsigned OUT_W  = 3     // width of acc_out code
) (
  input  logic [IN_W-1:0]  acc_in,
  input  logic [G_W-1:0]   grp,
  output logic             flag,
  output logic [OUT_W-1:0] acc_out
);

  int         acc_d;
  int         grp_d;
  int         new_d;
  logic [2:0] out_full;

  always_comb begin
    acc_d    = code_to_disp(3'(acc_in), IN_W, IN_ODD);
    grp_d    = code_to_disp(3'(grp), G_W, 1'b1);
    // same majority bit and a non-zero running disparity: invert
    flag     = (acc_d != 0) && (acc_in[IN_W-1] == grp[G_W-1]);
    new_d    = flag ? (acc_d - grp_d) : (acc_d + grp_d);
    out_full = disp_to_code(new_d, OUT_W, !IN_ODD);
    acc_out  = out_full[OUT_W-1:0];
  end

endmodule
