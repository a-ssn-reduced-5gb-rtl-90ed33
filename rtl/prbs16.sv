// prbs16: 16-bit-wide pseudo-random bit sequence source for one lane.
//
// Produces the PRBS15 sequence (x^15 + x^14 + 1), 16 consecutive bits per
// step: b[n] = b[n-15] ^ b[n-14]. The output register holds the last 16 bits
// of the sequence, bit 15 the oldest, and is the generator's whole state.
// On a rising clk edge with en high it advances by 16 bits. Synchronous
// active-low reset loads SEED (bits [14:0] must not all be zero).
// The paper uses a PRBS source per lane as test data but does not give its
// polynomial or width; PRBS15 and the seeding are this design's choice.
module prbs16 #(
  parameter logic [15:0] SEED = 16'h0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] data
);

  logic [15:0] next;

  always_comb begin
    next = data;
    for (int k = 0; k < 16; k++) next = {next[14:0], next[14] ^ next[13]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  data <= SEED;
    else if (en) data <= next;
  end

endmodule
