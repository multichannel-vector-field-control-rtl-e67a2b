// Host bus tasks shared by the block testbenches. The including module must
// declare clk, host_req (mfc_pkg::host_req_t) and host_rdata. Inputs change
// 1 ns after a rising clock edge; a read returns the data the block shows in
// the cycle after the request.
task automatic hwrite(input logic [19:0] a, input logic [31:0] d);
  host_req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
  @(posedge clk); #1;
  host_req = '0;
endtask

task automatic hread(input logic [19:0] a, output logic [31:0] d);
  host_req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
  @(posedge clk); #1;
  host_req = '0;
  d = host_rdata;
endtask
