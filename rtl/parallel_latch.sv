// parallel_latch: input register of the 14-bit parallel klystron ADC
// (channel 33).
//
// Once per sample (ce) the ADC word is registered. The ADC's offset-binary
// code is turned into two's complement by inverting the most significant bit,
// so that the down-converter sees a signed sample. Latency is one sample.
// The channel, its 14-bit width and its use in the fast klystron loop follow
// the document; the offset-binary coding is this design's assumption.
module parallel_latch #(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic [W-1:0]        din,
  output logic signed [W-1:0] dout
);
  always_ff @(posedge clk) begin
    if (rst)     dout <= '0;
    else if (ce) dout <= {~din[W-1], din[W-2:0]};
  end
endmodule
