// tb_downconv: loads random cosine/sine tables through the host port, reads
// some back, then streams random samples with a sample enable every third
// clock and checks I = x*cos/2^12 and Q = x*sin/2^12 one sample later, with
// the table word addressed on the previous sample enable.
module tb_downconv;
  import mfc_pkg::*;
  localparam int CH = 5;
  logic clk = 0, rst = 1, ce = 0;
  logic [7:0] tbl_addr_next = 0;
  logic signed [11:0] x = 0;
  logic signed [17:0] i_out, q_out;
  host_req_t host_req = '0;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;

  downconv #(.CH(CH)) dut (.clk, .rst, .ce, .tbl_addr_next, .x, .i_out, .q_out, .host_req, .host_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [17:0] cos_t [256], sin_t [256];

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

  logic [31:0] d;
  logic [7:0] a_prev;
  logic signed [29:0] p;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 256; k++) begin
      cos_t[k] = 18'($urandom);
      sin_t[k] = 18'($urandom);
      hwrite({DC_REGION, 1'b0, 6'(CH), 1'b0, 8'(k)}, 32'($signed(cos_t[k])));
      hwrite({DC_REGION, 1'b0, 6'(CH), 1'b1, 8'(k)}, 32'($signed(sin_t[k])));
    end
    // another channel's address must not disturb this one
    hwrite({DC_REGION, 1'b0, 6'(CH + 1), 1'b0, 8'd3}, 32'h1);
    for (int k = 0; k < 256; k += 17) begin
      hread({DC_REGION, 1'b0, 6'(CH), 1'b0, 8'(k)}, d);
      checks++; if (d !== 32'($signed(cos_t[k]))) begin failures++; $display("cos rd %0d %h", k, d); end
      hread({DC_REGION, 1'b0, 6'(CH), 1'b1, 8'(k)}, d);
      checks++; if (d !== 32'($signed(sin_t[k]))) begin failures++; $display("sin rd %0d %h", k, d); end
    end
    hread({DC_REGION, 1'b0, 6'(CH + 1), 1'b0, 8'd3}, d);
    checks++; if (d !== 0) begin failures++; $display("foreign channel answered"); end
    // prime the coefficient pipeline
    tbl_addr_next = 8'($urandom);
    ce = 1; @(posedge clk); #1 ce = 0; @(posedge clk); @(posedge clk); #1;
    a_prev = tbl_addr_next;
    for (int n = 0; n < 400; n++) begin
      x = (n < 4) ? ((n % 2) ? 12'sh800 : 12'sh7FF) : 12'($urandom);
      tbl_addr_next = 8'($urandom);
      ce = 1;
      @(posedge clk); #1;
      ce = 0;
      p = 30'(x) * 30'(cos_t[a_prev]);
      checks++; if (i_out !== 18'(p >>> 12)) begin failures++; $display("I n=%0d got %0d exp %0d", n, i_out, p >>> 12); end
      p = 30'(x) * 30'(sin_t[a_prev]);
      checks++; if (q_out !== 18'(p >>> 12)) begin failures++; $display("Q n=%0d got %0d exp %0d", n, q_out, p >>> 12); end
      a_prev = tbl_addr_next;
      @(posedge clk); @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
