// gain_stage: loop gain of a feedback loop, I and Q.
//
// The gain applied to each error is the product of a gain table value,
// addressed by the time-in-pulse index (so the gain can follow the pulse),
// and a klystron linearizer table value, addressed by an estimate of the
// present drive amplitude (so the gain can compensate the klystron's gain
// compression). Formats: gain table 1.0 = 4096, linearizer 1.0 = 65536.
// The combined gain g = gain * lin / 65536 is formed and registered one
// sample ahead; the output error * g / 4096, saturated to W bits, is
// registered on the sample the error arrives: latency one sample.
// I error uses the I gain table, Q error the Q gain table. The document names
// the gain tables, the linearizer and the multipliers; formats, indexing and
// pipelining are this design's choices.
module gain_stage
  import mfc_pkg::*;
#(
  parameter int unsigned W      = 18,
  parameter int unsigned TBL_AW = 11,
  parameter int unsigned LIN_AW = 8,
  parameter int unsigned ID_I   = 2,
  parameter int unsigned ID_Q   = 3,
  parameter int unsigned LIN_ID = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic [TBL_AW-1:0]    t_addr,
  input  logic [LIN_AW-1:0]    lin_addr,
  input  logic signed [W-1:0]  i_err,
  input  logic signed [W-1:0]  q_err,
  output logic signed [W-1:0]  i_out,
  output logic signed [W-1:0]  q_out,
  input  host_req_t            host_req,
  output logic [HDW-1:0]       host_rdata
);
  localparam int unsigned PW = 2 * W;
  localparam int unsigned GAIN_FRAC = 12;
  localparam int unsigned LIN_FRAC  = 16;

  logic [W-1:0] gi_t, gq_t, lin_t;
  logic [HDW-1:0] rd_i, rd_q, rd_l;

  host_table #(.AW(TBL_AW), .W(W), .REGION(PT_REGION), .ID_HI(14), .ID_LO(11), .ID(ID_I)) u_g_i (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(t_addr), .a_wdata('0), .a_rdata(gi_t),
    .host_req, .host_rdata(rd_i));
  host_table #(.AW(TBL_AW), .W(W), .REGION(PT_REGION), .ID_HI(14), .ID_LO(11), .ID(ID_Q)) u_g_q (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(t_addr), .a_wdata('0), .a_rdata(gq_t),
    .host_req, .host_rdata(rd_q));
  host_table #(.AW(LIN_AW), .W(W), .REGION(LIN_REGION), .ID_HI(8), .ID_LO(8), .ID(LIN_ID)) u_lin (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(lin_addr), .a_wdata('0), .a_rdata(lin_t),
    .host_req, .host_rdata(rd_l));

  assign host_rdata = rd_i | rd_q | rd_l;

  function automatic logic signed [W-1:0] sat(input logic signed [PW-1:0] v);
    if (v > PW'(2**(W-1) - 1))   return {1'b0, {(W-1){1'b1}}};
    else if (v < -PW'(2**(W-1))) return {1'b1, {(W-1){1'b0}}};
    else                         return v[W-1:0];
  endfunction

  logic signed [W-1:0]  g_i, g_q;
  logic signed [PW-1:0] pgi, pgq, pei, peq;
  assign pgi = PW'($signed(gi_t)) * PW'($signed(lin_t));
  assign pgq = PW'($signed(gq_t)) * PW'($signed(lin_t));
  assign pei = PW'(i_err) * PW'(g_i);
  assign peq = PW'(q_err) * PW'(g_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      g_i   <= '0;
      g_q   <= '0;
      i_out <= '0;
      q_out <= '0;
    end else if (ce) begin
      g_i   <= sat(pgi >>> LIN_FRAC);
      g_q   <= sat(pgq >>> LIN_FRAC);
      i_out <= sat(pei >>> GAIN_FRAC);
      q_out <= sat(peq >>> GAIN_FRAC);
    end
  end
endmodule
