// downconv: down-converter of one input channel.
//
// The IF sample x is multiplied by a cosine and a sine table value to give
// the channel's I and Q. The two 18-bit tables (256 words each) are written
// by the host, so they can hold scaled and phase-offset cosine/sine values
// and give each channel its own gain and rotation (calibration) as part of
// the down-conversion. The table address is supplied by a counter shared by
// all channels; it is presented one sample early (tbl_addr_next, read on ce)
// so the coefficient is waiting when the sample arrives. Products are
// shifted right by IN_W bits, which keeps them inside OUT_W = COEF_W bits
// without overflow. Latency: one sample (ce) from x to i_out/q_out.
//
// Host access: region DC_REGION, addr[14:9] = CH, addr[8] selects cos (0)
// or sin (1), addr[7:0] the word. Read data appears on host_rdata (sign
// extended) the cycle after the request and is zero otherwise, so the read
// data of all tables can be ORed.
//
// From the document: multiplication by an 18-bit, 256-deep, host-writable
// cosine/sine table per channel. This design's choices: table addressing,
// scaling, latency and the host address map.
module downconv
  import mfc_pkg::*;
#(
  parameter int unsigned IN_W   = 12,
  parameter int unsigned COEF_W = 18,
  parameter int unsigned TBL_AW = 8,
  parameter int unsigned OUT_W  = 18,
  parameter int unsigned CH     = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic [TBL_AW-1:0]       tbl_addr_next,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out,
  input  host_req_t               host_req,
  output logic [HDW-1:0]          host_rdata
);
  localparam int unsigned PW = IN_W + COEF_W;

  logic hit, hit_cos, hit_sin, rd_cos_q, rd_sin_q;
  assign hit     = region(host_req.addr) == DC_REGION && host_req.addr[14:9] == 6'(CH);
  assign hit_cos = hit && !host_req.addr[8] && (host_req.we || host_req.re);
  assign hit_sin = hit &&  host_req.addr[8] && (host_req.we || host_req.re);

  logic [COEF_W-1:0] cos_c, sin_c, cos_h, sin_h;

  dp_table #(.AW(TBL_AW), .W(COEF_W)) u_cos (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(tbl_addr_next), .a_wdata('0), .a_rdata(cos_c),
    .b_en(hit_cos), .b_we(host_req.we), .b_addr(host_req.addr[TBL_AW-1:0]),
    .b_wdata(host_req.wdata[COEF_W-1:0]), .b_rdata(cos_h));
  dp_table #(.AW(TBL_AW), .W(COEF_W)) u_sin (
    .clk, .a_en(ce), .a_we(1'b0), .a_addr(tbl_addr_next), .a_wdata('0), .a_rdata(sin_c),
    .b_en(hit_sin), .b_we(host_req.we), .b_addr(host_req.addr[TBL_AW-1:0]),
    .b_wdata(host_req.wdata[COEF_W-1:0]), .b_rdata(sin_h));

  logic signed [PW-1:0] pi, pq;
  assign pi = PW'(x) * PW'($signed(cos_c));
  assign pq = PW'(x) * PW'($signed(sin_c));

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out <= '0;
      q_out <= '0;
    end else if (ce) begin
      i_out <= OUT_W'(pi >>> IN_W);
      q_out <= OUT_W'(pq >>> IN_W);
    end
  end

  always_ff @(posedge clk) begin
    rd_cos_q <= hit_cos && host_req.re;
    rd_sin_q <= hit_sin && host_req.re;
  end

  always_comb begin
    host_rdata = '0;
    if (rd_cos_q) host_rdata = HDW'($signed(cos_h));
    if (rd_sin_q) host_rdata = HDW'($signed(sin_h));
  end
endmodule
