// tb_gain_stage: loads gain and linearizer tables, then checks
// out = sat(err * g / 4096) where g = sat(gain * lin / 65536) is formed from
// the table words addressed two samples earlier (one sample to read, one to
// register the combined gain). Includes saturating cases.
module tb_gain_stage;
  import mfc_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  logic [10:0] t_addr = 0;
  logic [7:0] lin_addr = 0;
  logic signed [17:0] i_err = 0, q_err = 0, i_out, q_out;
  host_req_t host_req = '0;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;

  gain_stage dut (.clk, .rst, .ce, .t_addr, .lin_addr, .i_err, .q_err, .i_out, .q_out, .host_req, .host_rdata);
  always #5 clk = ~clk;
  `include "tb_host_tasks.svh"

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NT = 64;   // table words used
  logic signed [17:0] gi [NT], gq [NT], ln [256];
  logic [31:0] d;
  longint g_i, g_q, ei, eq;
  int ta [$], la [$];
  function automatic longint sat18(longint v);
    return v > 131071 ? 131071 : v < -131072 ? -131072 : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < NT; k++) begin
      gi[k] = (k == 1) ? 18'sh1FFFF : 18'(int'($urandom % 20000) - 10000);
      gq[k] = 18'(int'($urandom % 20000) - 10000);
      hwrite({PT_REGION, 1'b0, 4'(TID_G_I), 11'(k)}, 32'($signed(gi[k])));
      hwrite({PT_REGION, 1'b0, 4'(TID_G_Q), 11'(k)}, 32'($signed(gq[k])));
    end
    for (int k = 0; k < 256; k++) begin
      ln[k] = (k == 2) ? 18'sh1FFFF : 18'(40000 + int'($urandom % 50000));
      hwrite({LIN_REGION, 7'd0, 1'b0, 8'(k)}, 32'($signed(ln[k])));
    end
    hwrite({LIN_REGION, 7'd0, 1'b1, 8'd0}, 32'h123);   // klystron linearizer: not this block's
    hread({LIN_REGION, 7'd0, 1'b0, 8'd77}, d);
    checks++; if (d !== 32'($signed(ln[77]))) begin failures++; $display("lin readback"); end
    hread({PT_REGION, 1'b0, 4'(TID_G_Q), 11'd5}, d);
    checks++; if (d !== 32'($signed(gq[5]))) begin failures++; $display("gain readback"); end
    hread({LIN_REGION, 7'd0, 1'b1, 8'd0}, d);
    checks++; if (d !== 0) begin failures++; $display("linearizer 1 answered"); end
    ta = {0, 0}; la = {0, 0};
    for (int n = 0; n < 600; n++) begin
      t_addr   = (n % 40 == 10) ? 11'd1 : 11'($urandom % NT);
      lin_addr = (n % 40 == 10) ? 8'd2 : 8'($urandom);
      i_err    = (n % 40 == 12) ? 18'sh1FFFF : 18'($urandom);
      q_err    = 18'($urandom);
      ce = 1; @(posedge clk); #1; ce = 0;
      // gain register used now was formed from tables read at sample n-2
      g_i = sat18((longint'(gi[ta[0]]) * longint'(ln[la[0]])) >>> 16);
      g_q = sat18((longint'(gq[ta[0]]) * longint'(ln[la[0]])) >>> 16);
      ei = sat18((longint'(i_err) * g_i) >>> 12);
      eq = sat18((longint'(q_err) * g_q) >>> 12);
      if (n >= 2) begin
        checks++;
        if (longint'(i_out) != ei || longint'(q_out) != eq) begin
          failures++; $display("n=%0d got %0d %0d exp %0d %0d", n, i_out, q_out, ei, eq);
        end
      end
      void'(ta.pop_front()); void'(la.pop_front());
      ta.push_back(int'(t_addr)); la.push_back(int'(lin_addr));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
