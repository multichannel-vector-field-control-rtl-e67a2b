// tb_ff_sum: loads feedforward tables and checks the drive sum
// sat(fb*fb_en + ff[previous index]*ff_en + kly*kly_en) one sample later
// for random inputs and every combination of the three enables.
module tb_ff_sum;
  import mfc_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  logic [10:0] t_addr = 0;
  logic fb_en = 0, ff_en = 0, kly_en = 0;
  logic signed [17:0] i_fb = 0, q_fb = 0, i_kly = 0, q_kly = 0, i_drv, q_drv;
  host_req_t host_req = '0;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;

  ff_sum dut (.clk, .rst, .ce, .t_addr, .fb_en, .ff_en, .kly_en, .i_fb, .q_fb, .i_kly, .q_kly,
              .i_drv, .q_drv, .host_req, .host_rdata);
  always #5 clk = ~clk;
  `include "tb_host_tasks.svh"

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NT = 128;
  logic signed [17:0] ffi [NT], ffq [NT];
  logic [31:0] d;
  int ei, eq, a_prev;
  function automatic int sat18(int v);
    return v > 131071 ? 131071 : v < -131072 ? -131072 : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < NT; k++) begin
      ffi[k] = 18'($urandom); ffq[k] = 18'($urandom);
      hwrite({PT_REGION, 1'b0, 4'(TID_FF_I), 11'(k)}, 32'($signed(ffi[k])));
      hwrite({PT_REGION, 1'b0, 4'(TID_FF_Q), 11'(k)}, 32'($signed(ffq[k])));
    end
    hread({PT_REGION, 1'b0, 4'(TID_FF_Q), 11'd17}, d);
    checks++; if (d !== 32'($signed(ffq[17]))) begin failures++; $display("readback"); end
    ce = 1; @(posedge clk); #1; ce = 0;
    a_prev = 0;
    for (int n = 0; n < 800; n++) begin
      {kly_en, ff_en, fb_en} = 3'(n % 8);
      t_addr = 11'($urandom % NT);
      i_fb = 18'($urandom); q_fb = 18'($urandom); i_kly = 18'($urandom); q_kly = 18'($urandom);
      ce = 1; @(posedge clk); #1; ce = 0;
      ei = sat18((fb_en ? int'(i_fb) : 0) + (ff_en ? int'(ffi[a_prev]) : 0) + (kly_en ? int'(i_kly) : 0));
      eq = sat18((fb_en ? int'(q_fb) : 0) + (ff_en ? int'(ffq[a_prev]) : 0) + (kly_en ? int'(q_kly) : 0));
      checks++; if (int'(i_drv) != ei || int'(q_drv) != eq) begin failures++; $display("n=%0d %0d %0d exp %0d %0d", n, i_drv, q_drv, ei, eq); end
      a_prev = int'(t_addr);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
