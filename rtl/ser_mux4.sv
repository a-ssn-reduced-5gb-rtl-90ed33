// ser_mux4: 4-to-1 serializing multiplexer for one output pin.
//
// d[k] is the pin's bit from lane k; each lane holds its bit for four bit
// slots. On every rising bit-clock edge the bit of lane sel is registered to
// q, which drives the output buffer. With sel stepping 0,1,2,3,... the pin
// carries the four lanes' bits in turn at the full bit rate. The output
// register (a retiming flop at the bit rate) is this design's choice; the
// paper's multiplexer is steered directly by the four clock phases.
// Synchronous active-low reset clears q.
module ser_mux4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] d,
  input  logic [1:0] sel,
  output logic       q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d[sel];
  end

endmodule
