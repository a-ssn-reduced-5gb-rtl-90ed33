// sgi_invert_reg: encoding block E of the encoder.
//
// XORs every bit of a group with the group's flag and registers the result
// together with the flag, exactly the "XOR gates and DFFs" of the paper.
// Timing: q and flag_q take the new values on the rising clock edge where en
// is high and hold them otherwise (one-cycle latency). Synchronous
// active-low reset clears both (reset behaviour is this design's choice).
module sgi_invert_reg #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  input  logic         flag,
  output logic [W-1:0] q,
  output logic         flag_q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q      <= '0;
      flag_q <= 1'b0;
    end else if (en) begin
      q      <= d ^ {W{flag}};
      flag_q <= flag;
    end
  end

endmodule
