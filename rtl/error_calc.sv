// error_calc: I/Q setpoint tables and feedback error.
//
// Two host-written tables hold the I and Q setpoint for each step of the RF
// pulse; they are addressed by the time-in-pulse index t_addr, read once per
// sample. Each sample the error setpoint - measurement is formed, saturated
// to W bits and registered: latency one sample. The same block serves the
// cavity loop (table ids TID_SP_I/Q) and the fast klystron loop
// (TID_KSP_I/Q). The document gives the setpoint tables and the error
// junction; table depth, time indexing, sign convention and latency are this
// design's choices.
module error_calc
  import mfc_pkg::*;
#(
  parameter int unsigned W      = 18,
  parameter int unsigned TBL_AW = 11,
  parameter int unsigned ID_I   = 0,
  parameter int unsigned ID_Q   = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic [TBL_AW-1:0]    t_addr,
  input  logic signed [W-1:0]  i_meas,
  input  logic signed [W-1:0]  q_meas,
  output logic signed [W-1:0]  i_err,
  output logic signed [W-1:0]  q_err,
  input  host_req_t            host_req,
  output logic [HDW-1:0]       host_rdata
);
  logic [W-1:0] sp_i, sp_q;
  logic [HDW-1:0] rd_i, rd_q;

  host_table #(.AW(TBL_AW), .W(W), .REGION(PT_REGION), .ID_HI(14), .ID_LO(11), .ID(ID_I)) u_sp_i (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(t_addr), .a_wdata('0), .a_rdata(sp_i),
    .host_req, .host_rdata(rd_i));
  host_table #(.AW(TBL_AW), .W(W), .REGION(PT_REGION), .ID_HI(14), .ID_LO(11), .ID(ID_Q)) u_sp_q (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(t_addr), .a_wdata('0), .a_rdata(sp_q),
    .host_req, .host_rdata(rd_q));

  assign host_rdata = rd_i | rd_q;

  function automatic logic signed [W-1:0] sat(input logic signed [W:0] v);
    if (v[W] != v[W-1]) return {v[W], {(W-1){~v[W]}}};
    else                return v[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      i_err <= '0;
      q_err <= '0;
    end else if (ce) begin
      i_err <= sat((W+1)'($signed(sp_i)) - (W+1)'(i_meas));
      q_err <= sat((W+1)'($signed(sp_q)) - (W+1)'(q_meas));
    end
  end
endmodule
