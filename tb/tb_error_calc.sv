// tb_error_calc: loads random I/Q setpoint tables, reads some back, then
// steps the table index and measurement randomly and checks
// error = saturate(setpoint[index of the previous sample] - measurement)
// one sample later, including both saturation limits.
module tb_error_calc;
  import mfc_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  logic [10:0] t_addr = 0;
  logic signed [17:0] i_meas = 0, q_meas = 0, i_err, q_err;
  host_req_t host_req = '0;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;

  error_calc #(.ID_I(TID_KSP_I), .ID_Q(TID_KSP_Q)) dut (.clk, .rst, .ce, .t_addr, .i_meas, .q_meas, .i_err, .q_err, .host_req, .host_rdata);
  always #5 clk = ~clk;
  `include "tb_host_tasks.svh"

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [17:0] sp_i [2048], sp_q [2048];
  logic [31:0] d;
  int ei, eq, a_prev;
  function automatic int sat18(int v);
    return v > 131071 ? 131071 : v < -131072 ? -131072 : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 2048; k++) begin
      sp_i[k] = (k == 7) ? 18'sh1FFFF : (k == 9) ? -18'sh20000 : 18'($urandom);
      sp_q[k] = 18'($urandom);
      hwrite({PT_REGION, 1'b0, 4'(TID_KSP_I), 11'(k)}, 32'($signed(sp_i[k])));
      hwrite({PT_REGION, 1'b0, 4'(TID_KSP_Q), 11'(k)}, 32'($signed(sp_q[k])));
    end
    for (int k = 0; k < 2048; k += 97) begin
      hread({PT_REGION, 1'b0, 4'(TID_KSP_I), 11'(k)}, d);
      checks++; if (d !== 32'($signed(sp_i[k]))) begin failures++; $display("rd I %0d", k); end
      hread({PT_REGION, 1'b0, 4'(TID_KSP_Q), 11'(k)}, d);
      checks++; if (d !== 32'($signed(sp_q[k]))) begin failures++; $display("rd Q %0d", k); end
    end
    hread({PT_REGION, 1'b0, 4'(TID_SP_I), 11'd5}, d);
    checks++; if (d !== 0) begin failures++; $display("other table id answered"); end
    t_addr = 0; ce = 1; @(posedge clk); #1; ce = 0;
    a_prev = 0;
    for (int n = 0; n < 500; n++) begin
      t_addr = (n % 50 == 3) ? 11'd7 : (n % 50 == 4) ? 11'd9 : 11'($urandom);
      i_meas = (n % 50 == 4) ? -18'sh20000 : (n % 50 == 5) ? 18'sh1FFFF : 18'($urandom);
      q_meas = 18'($urandom);
      ce = 1; @(posedge clk); #1; ce = 0;
      ei = sat18(int'(sp_i[a_prev]) - int'(i_meas));
      eq = sat18(int'(sp_q[a_prev]) - int'(q_meas));
      checks++; if (int'(i_err) != ei || int'(q_err) != eq) begin failures++; $display("n=%0d %0d %0d exp %0d %0d", n, i_err, q_err, ei, eq); end
      a_prev = int'(t_addr);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
