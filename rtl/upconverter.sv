// upconverter: forms one DAC channel from the drive I and Q.
//
// dac = saturate( (I * A[n] + Q * B[n]) / 2^20 ) to DAC_W bits, where A and
// B are two host-written tables (format 1.0 = 65536) stepped by a shared
// counter, presented one sample early like the down-converter tables.
// Constant tables give a gain and rotation of the I/Q vector (baseband I or Q
// for an external vector modulator); cosine/sine tables give up-conversion
// to the IF. Stage 1 registers the two products, stage 2 the saturated sum:
// latency two samples, as printed in the document's diagram. The DAC word is
// two's complement. The document gives "Gain + Rotation" and the two-cycle
// latency; the formula, the table format and the depth are this design's
// choices. Host access: region UC_REGION, addr[10:9] = UC, addr[8] 0 = A,
// 1 = B, addr[7:0] word.
module upconverter
  import mfc_pkg::*;
#(
  parameter int unsigned W      = 18,
  parameter int unsigned TBL_AW = 8,
  parameter int unsigned DAC_W  = 14,
  parameter int unsigned UC     = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic [TBL_AW-1:0]       tbl_addr_next,
  input  logic signed [W-1:0]     i_in,
  input  logic signed [W-1:0]     q_in,
  output logic signed [DAC_W-1:0] dac,
  input  host_req_t               host_req,
  output logic [HDW-1:0]          host_rdata
);
  localparam int unsigned PW    = 2 * W;
  localparam int unsigned SHIFT = 16 + (W - DAC_W);

  logic [W-1:0] ta, tb;
  logic [HDW-1:0] rd_a, rd_b;

  host_table #(.AW(TBL_AW), .W(W), .REGION(UC_REGION), .ID_HI(10), .ID_LO(8), .ID(2*UC)) u_a (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(tbl_addr_next), .a_wdata('0), .a_rdata(ta),
    .host_req, .host_rdata(rd_a));
  host_table #(.AW(TBL_AW), .W(W), .REGION(UC_REGION), .ID_HI(10), .ID_LO(8), .ID(2*UC+1)) u_b (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(tbl_addr_next), .a_wdata('0), .a_rdata(tb),
    .host_req, .host_rdata(rd_b));

  assign host_rdata = rd_a | rd_b;

  function automatic logic signed [DAC_W-1:0] sat(input logic signed [PW:0] v);
    if (v > (PW+1)'(2**(DAC_W-1) - 1))   return {1'b0, {(DAC_W-1){1'b1}}};
    else if (v < -(PW+1)'(2**(DAC_W-1))) return {1'b1, {(DAC_W-1){1'b0}}};
    else                                 return v[DAC_W-1:0];
  endfunction

  logic signed [PW-1:0] pa, pb;
  logic signed [PW:0]   s;
  assign s = (PW+1)'(pa) + (PW+1)'(pb);

  always_ff @(posedge clk) begin
    if (rst) begin
      pa  <= '0;
      pb  <= '0;
      dac <= '0;
    end else if (ce) begin
      pa  <= PW'(i_in) * PW'($signed(ta));
      pb  <= PW'(q_in) * PW'($signed(tb));
      dac <= sat(s >>> SHIFT);
    end
  end
endmodule
