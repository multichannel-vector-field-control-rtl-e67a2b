// lpf: first-order low-pass filter of the fast klystron loop (one for I,
// one for Q).
//
// y[n+1] = y[n] + (x[n] - y[n]) / 2^k, computed on a state with FRAC extra
// fraction bits so small steps are not lost. k comes from a control register
// (k = 0 passes the input through with one sample delay). Latency one sample;
// DC gain 1; -3 dB bandwidth about fs / (2 pi 2^k). The document only names
// the LPF; the filter type is this design's choice.
module lpf #(
  parameter int unsigned W    = 18,
  parameter int unsigned FRAC = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic [3:0]          k,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  localparam int unsigned AW = W + FRAC + 1;

  logic signed [AW-1:0] acc, diff;
  assign diff = (AW'(x) <<< FRAC) - acc;
  assign y    = W'(acc >>> FRAC);

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (ce) acc <= acc + (diff >>> k);
  end
endmodule
