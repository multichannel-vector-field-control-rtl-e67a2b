// vector_sum: adds the I (and the Q) outputs of the N cavity channels into
// the cavity vector sum.
//
// The sum is taken at full precision (IN_W + clog2(N) bits) and registered
// once per sample, so the latency is one sample, as the document's signal
// processing diagram gives for this adder. N = 24 cavity channels follows the
// document; the widths are this design's choice.
module vector_sum #(
  parameter int unsigned N    = 24,
  parameter int unsigned IN_W = 18,
  parameter int unsigned OW   = IN_W + $clog2(N)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ce,
  input  logic signed [N-1:0][IN_W-1:0] i_in,
  input  logic signed [N-1:0][IN_W-1:0] q_in,
  output logic signed [OW-1:0]          i_sum,
  output logic signed [OW-1:0]          q_sum
);
  logic signed [OW-1:0] si, sq;
  always_comb begin
    si = '0;
    sq = '0;
    for (int k = 0; k < N; k++) begin
      si += OW'($signed(i_in[k]));
      sq += OW'($signed(q_in[k]));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_sum <= '0;
      q_sum <= '0;
    end else if (ce) begin
      i_sum <= si;
      q_sum <= sq;
    end
  end
endmodule
