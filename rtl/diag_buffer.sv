// diag_buffer: one diagnostic waveform buffer.
//
// While an acquisition runs, acq_ctrl pulses wr_en once per acquisition
// period with the running address; the buffer stores din at that address.
// The host reads the buffer through region BUF_REGION, addr[14:11] = ID,
// addr[AW-1:0] = word; read data follows one cycle after the request (see
// host_table). The document names the buffers and the 1 MSample/s
// acquisition rate; depth, width and the read-only host port are this
// design's choices.
module diag_buffer
  import mfc_pkg::*;
#(
  parameter int unsigned W  = 18,
  parameter int unsigned AW = 11,
  parameter int unsigned ID = 0
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [AW-1:0]  wr_addr,
  input  logic [W-1:0]   din,
  input  host_req_t      host_req,
  output logic [HDW-1:0] host_rdata
);
  host_req_t rd_only;
  logic [W-1:0] unused_q;

  // the host may only read: writes to the buffer region are dropped
  always_comb begin
    rd_only    = host_req;
    rd_only.we = 1'b0;
  end

  host_table #(.AW(AW), .W(W), .REGION(BUF_REGION), .ID_HI(14), .ID_LO(11), .ID(ID)) u_ram (
    .clk, .a_en(wr_en), .a_we(1'b1), .a_addr(wr_addr), .a_wdata(din), .a_rdata(unused_q),
    .host_req(rd_only), .host_rdata);
endmodule
