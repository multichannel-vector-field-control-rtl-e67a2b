// ff_sum: drive summing junction before the up-converters.
//
// Per sample, the drive is the sum of the feedback term (error x gain), the
// feedforward table value for the present step of the pulse and the output
// of the fast klystron loop, saturated to W bits and registered: latency one
// sample, as printed in the document's diagram. Each of the three terms has
// an enable from the control register so the loops can be opened. The
// feedforward tables (I and Q) are host written and addressed by the
// time-in-pulse index. The enables and saturation are this design's choices.
module ff_sum
  import mfc_pkg::*;
#(
  parameter int unsigned W      = 18,
  parameter int unsigned TBL_AW = 11
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic [TBL_AW-1:0]    t_addr,
  input  logic                 fb_en,
  input  logic                 ff_en,
  input  logic                 kly_en,
  input  logic signed [W-1:0]  i_fb,
  input  logic signed [W-1:0]  q_fb,
  input  logic signed [W-1:0]  i_kly,
  input  logic signed [W-1:0]  q_kly,
  output logic signed [W-1:0]  i_drv,
  output logic signed [W-1:0]  q_drv,
  input  host_req_t            host_req,
  output logic [HDW-1:0]       host_rdata
);
  localparam int unsigned SW = W + 2;

  logic [W-1:0] ff_i, ff_q;
  logic [HDW-1:0] rd_i, rd_q;

  host_table #(.AW(TBL_AW), .W(W), .REGION(PT_REGION), .ID_HI(14), .ID_LO(11), .ID(TID_FF_I)) u_ff_i (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(t_addr), .a_wdata('0), .a_rdata(ff_i),
    .host_req, .host_rdata(rd_i));
  host_table #(.AW(TBL_AW), .W(W), .REGION(PT_REGION), .ID_HI(14), .ID_LO(11), .ID(TID_FF_Q)) u_ff_q (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(t_addr), .a_wdata('0), .a_rdata(ff_q),
    .host_req, .host_rdata(rd_q));

  assign host_rdata = rd_i | rd_q;

  function automatic logic signed [W-1:0] sat(input logic signed [SW-1:0] v);
    if (v > SW'(2**(W-1) - 1))   return {1'b0, {(W-1){1'b1}}};
    else if (v < -SW'(2**(W-1))) return {1'b1, {(W-1){1'b0}}};
    else                         return v[W-1:0];
  endfunction

  logic signed [SW-1:0] si, sq;
  always_comb begin
    si = '0;
    sq = '0;
    if (fb_en)  begin si += SW'(i_fb);            sq += SW'(q_fb);            end
    if (ff_en)  begin si += SW'($signed(ff_i));   sq += SW'($signed(ff_q));   end
    if (kly_en) begin si += SW'(i_kly);           sq += SW'(q_kly);           end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_drv <= '0;
      q_drv <= '0;
    end else if (ce) begin
      i_drv <= sat(si);
      q_drv <= sat(sq);
    end
  end
endmodule
