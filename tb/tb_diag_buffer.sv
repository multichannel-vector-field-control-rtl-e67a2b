// tb_diag_buffer: writes random words at random addresses through the
// acquisition port, reads them back through the host port, and checks that
// host writes to the buffer are ignored and other buffer ids do not answer.
module tb_diag_buffer;
  import mfc_pkg::*;
  logic clk = 0, wr_en = 0;
  logic [10:0] wr_addr = 0;
  logic [17:0] din = 0;
  host_req_t host_req = '0;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;

  diag_buffer #(.ID(BUF_IERR)) dut (.clk, .wr_en, .wr_addr, .din, .host_req, .host_rdata);
  always #5 clk = ~clk;
  `include "tb_host_tasks.svh"

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [17:0] model [int];
  logic [31:0] d;
  int a;
  initial begin
    @(posedge clk); #1;
    for (int n = 0; n < 2048; n++) begin
      wr_en = 1; wr_addr = 11'(n); din = 18'($urandom);
      model[n] = din;
      @(posedge clk); #1;
    end
    wr_en = 0;
    hwrite({BUF_REGION, 1'b0, 4'(BUF_IERR), 11'd5}, 32'h0);
    for (int n = 0; n < 300; n++) begin
      a = (n == 0) ? 5 : int'($urandom % 2048);
      hread({BUF_REGION, 1'b0, 4'(BUF_IERR), 11'(a)}, d);
      checks++; if (d !== 32'($signed(model[a]))) begin failures++; $display("a=%0d got %h exp %h", a, d, model[a]); end
    end
    hread({BUF_REGION, 1'b0, 4'(BUF_QERR), 11'd3}, d);
    checks++; if (d !== 0) begin failures++; $display("other buffer answered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
