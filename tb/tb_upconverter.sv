// tb_upconverter: loads random A/B tables into up-converter 2 and checks
// dac = sat14((I*A + Q*B) / 2^20) two samples after the inputs, with the
// table words addressed on the sample before; then loads a 1.0/0 table pair
// and checks that the output is I/16, as a baseband (modulator) output.
module tb_upconverter;
  import mfc_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  logic [7:0] tbl_addr_next = 0;
  logic signed [17:0] i_in = 0, q_in = 0;
  logic signed [13:0] dac;
  host_req_t host_req = '0;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;

  upconverter #(.UC(2)) dut (.clk, .rst, .ce, .tbl_addr_next, .i_in, .q_in, .dac, .host_req, .host_rdata);
  always #5 clk = ~clk;
  `include "tb_host_tasks.svh"

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [17:0] ta [256], tb [256];
  logic [31:0] d;
  longint e [$];
  longint v;
  int a_prev;

  task automatic run(input int nsamp, input bit random_in);
    e = {0, 0};
    for (int n = 0; n < nsamp; n++) begin
      tbl_addr_next = 8'($urandom);
      i_in = random_in ? 18'($urandom) : 18'(int'($urandom % 200000) - 100000);
      q_in = 18'($urandom);
      ce = 1; @(posedge clk); #1; ce = 0;
      v = (longint'(i_in) * longint'(ta[a_prev]) + longint'(q_in) * longint'(tb[a_prev])) >>> 20;
      if (v > 8191) v = 8191;
      if (v < -8192) v = -8192;
      e.push_back(v);
      void'(e.pop_front());
      // e[0] is the value for the sample before the previous one
      if (n >= 2) begin
        checks++; if (longint'(dac) != e[0]) begin failures++; $display("n=%0d got %0d exp %0d", n, dac, e[0]); end
      end
      a_prev = int'(tbl_addr_next);
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 256; k++) begin
      ta[k] = 18'($urandom); tb[k] = 18'($urandom);
      hwrite({UC_REGION, 5'd0, 2'd2, 1'b0, 8'(k)}, 32'($signed(ta[k])));
      hwrite({UC_REGION, 5'd0, 2'd2, 1'b1, 8'(k)}, 32'($signed(tb[k])));
    end
    hwrite({UC_REGION, 5'd0, 2'd1, 1'b0, 8'd4}, 32'h5);   // other up-converter
    hread({UC_REGION, 5'd0, 2'd2, 1'b1, 8'd9}, d);
    checks++; if (d !== 32'($signed(tb[9]))) begin failures++; $display("readback"); end
    hread({UC_REGION, 5'd0, 2'd1, 1'b0, 8'd4}, d);
    checks++; if (d !== 0) begin failures++; $display("other uc answered"); end
    tbl_addr_next = 0; ce = 1; @(posedge clk); #1; ce = 0;
    a_prev = 0;
    run(400, 1'b1);
    for (int k = 0; k < 256; k++) begin
      ta[k] = 18'sd65536; tb[k] = 18'sd0;
      hwrite({UC_REGION, 5'd0, 2'd2, 1'b0, 8'(k)}, 32'd65536);
      hwrite({UC_REGION, 5'd0, 2'd2, 1'b1, 8'(k)}, 32'd0);
    end
    run(100, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
