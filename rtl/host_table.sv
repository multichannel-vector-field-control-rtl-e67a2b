// host_table: a dp_table with the host address decoding attached.
//
// The table answers host requests whose region is REGION and whose id field
// addr[ID_HI:ID_LO] equals ID; addr[AW-1:0] selects the word. Host writes
// take effect at the end of the request cycle. Host read data, sign extended
// to the host data width, is on host_rdata during the cycle after a read
// request and is zero at all other times, so the read data of all tables of
// the design can simply be ORed together. The datapath port (a_*) is passed
// through to the RAM: synchronous read, one cycle latency, gated by a_en.
module host_table
  import mfc_pkg::*;
#(
  parameter int unsigned AW     = 11,
  parameter int unsigned W      = 18,
  parameter logic [3:0]  REGION = PT_REGION,
  parameter int unsigned ID_HI  = 14,
  parameter int unsigned ID_LO  = 11,
  parameter int unsigned ID     = 0
) (
  input  logic           clk,
  input  logic           a_en,
  input  logic           a_we,
  input  logic [AW-1:0]  a_addr,
  input  logic [W-1:0]   a_wdata,
  output logic [W-1:0]   a_rdata,
  input  host_req_t      host_req,
  output logic [HDW-1:0] host_rdata
);
  logic hit, rd_q;
  logic [W-1:0] b_rdata;

  assign hit = region(host_req.addr) == REGION &&
               host_req.addr[ID_HI:ID_LO] == (ID_HI-ID_LO+1)'(ID) &&
               (host_req.we || host_req.re);

  dp_table #(.AW(AW), .W(W)) u_ram (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en(hit), .b_we(host_req.we), .b_addr(host_req.addr[AW-1:0]),
    .b_wdata(host_req.wdata[W-1:0]), .b_rdata);

  always_ff @(posedge clk) rd_q <= hit && host_req.re;

  assign host_rdata = rd_q ? HDW'($signed(b_rdata)) : '0;
endmodule
