// dp_table: dual-port table RAM used for every lookup table and diagnostic
// buffer of the MFC FPGA.
//
// Port A is the datapath port. It either reads (a_we = 0) or, for the
// diagnostic buffers, writes. Port B is the host port: it is enabled by
// b_en, writes when b_we is set and otherwise reads. Both reads are
// synchronous: the word addressed in cycle n appears on the rdata output in
// cycle n+1. Port A reads are gated by a_en so the datapath can hold a value
// between samples. This maps onto the true dual-port block RAM of the target
// FPGA family. Contents are not reset; a simultaneous write to the same word
// from both ports is resolved in favour of port B.
module dp_table #(
  parameter int unsigned AW = 8,
  parameter int unsigned W  = 18
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
