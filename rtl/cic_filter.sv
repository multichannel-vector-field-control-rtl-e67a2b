// cic_filter: first-order cascaded integrator-comb (boxcar) filter at the
// full sample rate, one instance each for the I and the Q vector sum.
//
// Stage 1 integrates the input (modulo 2^AW, which the comb undoes exactly).
// Stage 2 subtracts the integrator value of M samples earlier, giving the sum
// of the last M inputs; it is shifted right by SHIFT and saturated to OUT_W
// bits. Each stage is one register, so the latency is two samples, as printed
// in the document's diagram. Order 1, M = 8, no decimation and the scaling are
// this design's choices; the document only names a pair of CIC filters.
module cic_filter #(
  parameter int unsigned IN_W  = 23,
  parameter int unsigned OUT_W = 18,
  parameter int unsigned M     = 8,
  parameter int unsigned SHIFT = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam int unsigned AW = IN_W + $clog2(M);

  logic signed [AW-1:0] integ;
  logic signed [AW-1:0] dly [M];   // integrator history, dly[M-1] is M samples old
  logic signed [AW-1:0] comb;

  assign comb = integ - dly[M-1];

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [AW-1:0] v);
    if (v > AW'(2**(OUT_W-1) - 1))         return {1'b0, {(OUT_W-1){1'b1}}};
    else if (v < -AW'(2**(OUT_W-1)))       return {1'b1, {(OUT_W-1){1'b0}}};
    else                                   return v[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      integ <= '0;
      y     <= '0;
      for (int k = 0; k < M; k++) dly[k] <= '0;
    end else if (ce) begin
      integ  <= integ + AW'(x);
      dly[0] <= integ;
      for (int k = 1; k < M; k++) dly[k] <= dly[k-1];
      y <= sat(comb >>> SHIFT);
    end
  end
endmodule
