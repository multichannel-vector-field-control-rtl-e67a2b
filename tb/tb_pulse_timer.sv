// tb_pulse_timer: with a 4-bit index and divider 2, checks that after a
// trigger the index steps 0..15 once every 3 sample enables, that active
// falls after the last step while the index holds at 15, and that a second
// trigger restarts the pulse.
module tb_pulse_timer;
  logic clk = 0, rst = 1, ce = 0, trig = 0;
  logic [7:0] div = 8'd2;
  logic [3:0] t_addr;
  logic active;
  int checks = 0, failures = 0;

  pulse_timer #(.AW(4)) dut (.clk, .rst, .ce, .trig, .div, .t_addr, .active);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    ce = 1; @(posedge clk); #1; ce = 0;
    @(posedge clk); #1;
  endtask

  int e;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 5; n++) begin
      tick();
      checks++; if (active || t_addr != 0) begin failures++; $display("active without trigger"); end
    end
    for (int p = 0; p < 2; p++) begin
      trig = 1; @(posedge clk); #1; trig = 0;
      checks++; if (!active || t_addr != 0) begin failures++; $display("no start"); end
      for (int n = 1; n <= 60; n++) begin
        tick();
        e = (n / 3 > 15) ? 15 : n / 3;
        checks++;
        if (t_addr != 4'(e) || active != (n < 48)) begin
          failures++; $display("p=%0d n=%0d t=%0d act=%b exp %0d", p, n, t_addr, active, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
