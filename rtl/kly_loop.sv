// kly_loop: fast klystron feedback loop.
//
// The down-converted klystron channel (channel 33) is low-pass filtered (lpf,
// I and Q), compared with the klystron I/Q setpoint tables (error_calc with
// table ids TID_KSP_I/Q) and multiplied by the klystron gain tables and the
// klystron loop's own linearizer table (gain_stage with TID_KG_I/Q and
// linearizer 1). Its output is added to the drive in ff_sum. Latency three
// samples (filter, error, gain). The structure follows the document's
// diagram; the parts' insides are this design's choices (see each module).
module kly_loop
  import mfc_pkg::*;
#(
  parameter int unsigned W      = 18,
  parameter int unsigned TBL_AW = 11,
  parameter int unsigned LIN_AW = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic [3:0]           lpf_k,
  input  logic [TBL_AW-1:0]    t_addr,
  input  logic [LIN_AW-1:0]    lin_addr,
  input  logic signed [W-1:0]  i_in,
  input  logic signed [W-1:0]  q_in,
  output logic signed [W-1:0]  i_out,
  output logic signed [W-1:0]  q_out,
  input  host_req_t            host_req,
  output logic [HDW-1:0]       host_rdata
);
  logic signed [W-1:0] i_f, q_f, i_e, q_e;
  logic [HDW-1:0] rd_e, rd_g;

  lpf #(.W(W)) u_lpf_i (.clk, .rst, .ce, .k(lpf_k), .x(i_in), .y(i_f));
  lpf #(.W(W)) u_lpf_q (.clk, .rst, .ce, .k(lpf_k), .x(q_in), .y(q_f));

  error_calc #(.W(W), .TBL_AW(TBL_AW), .ID_I(TID_KSP_I), .ID_Q(TID_KSP_Q)) u_err (
    .clk, .rst, .ce, .t_addr, .i_meas(i_f), .q_meas(q_f), .i_err(i_e), .q_err(q_e),
    .host_req, .host_rdata(rd_e));

  gain_stage #(.W(W), .TBL_AW(TBL_AW), .LIN_AW(LIN_AW), .ID_I(TID_KG_I), .ID_Q(TID_KG_Q), .LIN_ID(1)) u_gain (
    .clk, .rst, .ce, .t_addr, .lin_addr, .i_err(i_e), .q_err(q_e), .i_out, .q_out,
    .host_req, .host_rdata(rd_g));

  assign host_rdata = rd_e | rd_g;
endmodule
