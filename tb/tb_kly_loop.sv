// tb_kly_loop: fills the klystron setpoint, gain and linearizer tables with
// constants and compares the loop output with a reference model of the
// chain low-pass -> setpoint - filtered -> x gain (three samples), for
// filter shifts 0 and 3. With k = 0 and unity gain the output must equal
// setpoint minus the input of three samples earlier.
module tb_kly_loop;
  import mfc_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  logic [3:0] lpf_k = 0;
  logic [10:0] t_addr = 0;
  logic [7:0] lin_addr = 0;
  logic signed [17:0] i_in = 0, q_in = 0, i_out, q_out;
  host_req_t host_req = '0;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;

  kly_loop dut (.clk, .rst, .ce, .lpf_k, .t_addr, .lin_addr, .i_in, .q_in, .i_out, .q_out, .host_req, .host_rdata);
  always #5 clk = ~clk;
  `include "tb_host_tasks.svh"

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat18(longint v);
    return v > 131071 ? 131071 : v < -131072 ? -131072 : v;
  endfunction

  longint acc_i, acc_q, yi [$], yq [$], ei [$], eq [$], gi, gq, oi, oq;
  logic [31:0] d;

  task automatic run(input int k, input int spi, input int spq, input int gain, input int lin);
    hwrite({PT_REGION, 1'b0, 4'(TID_KSP_I), 11'd0}, 32'(spi));
    hwrite({PT_REGION, 1'b0, 4'(TID_KSP_Q), 11'd0}, 32'(spq));
    hwrite({PT_REGION, 1'b0, 4'(TID_KG_I), 11'd0}, 32'(gain));
    hwrite({PT_REGION, 1'b0, 4'(TID_KG_Q), 11'd0}, 32'(gain));
    hwrite({LIN_REGION, 7'd0, 1'b1, 8'd0}, 32'(lin));
    lpf_k = 4'(k);
    gi = sat18((longint'(gain) * lin) >>> 16);
    gq = gi;
    // flush with zero input
    i_in = 0; q_in = 0;
    rst = 1; @(posedge clk); #1 rst = 0;
    acc_i = 0; acc_q = 0;
    yi = {0, 0}; yq = {0, 0}; ei = {0, 0}; eq = {0, 0};
    for (int n = 0; n < 300; n++) begin
      i_in = 18'(int'($urandom % 100000) - 50000);
      q_in = 18'(int'($urandom % 100000) - 50000);
      ce = 1; @(posedge clk); #1; ce = 0;
      acc_i = acc_i + ((longint'(i_in) * 256 - acc_i) >>> k);
      acc_q = acc_q + ((longint'(q_in) * 256 - acc_q) >>> k);
      oi = sat18((ei[$] * gi) >>> 12);
      oq = sat18((eq[$] * gq) >>> 12);
      ei.push_back(sat18(spi - yi[$])); eq.push_back(sat18(spq - yq[$]));
      yi.push_back(acc_i >>> 8); yq.push_back(acc_q >>> 8);
      if (n >= 4) begin
        checks++;
        if (longint'(i_out) != oi || longint'(q_out) != oq) begin
          failures++; $display("k=%0d n=%0d got %0d %0d exp %0d %0d", k, n, i_out, q_out, oi, oq);
        end
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(0, 1000, -2000, 4096, 65536);
    run(3, 30000, 12345, 2048, 50000);
    hread({PT_REGION, 1'b0, 4'(TID_KG_I), 11'd0}, d);
    checks++; if (d !== 32'd2048) begin failures++; $display("readback %0d", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
