// tb_acq_ctrl: with a 5-bit address and divider 3, checks that after a
// trigger a write strobe comes on every 4th sample enable with addresses
// 0, 1, 2, ... 31, that busy/done follow, that nothing is written without a
// trigger and that a retrigger restarts from address 0.
module tb_acq_ctrl;
  logic clk = 0, rst = 1, ce = 0, trig = 0;
  logic [7:0] div = 8'd3;
  logic wr_en, busy, done;
  logic [4:0] wr_addr;
  int checks = 0, failures = 0;

  acq_ctrl #(.AW(5)) dut (.clk, .rst, .ce, .trig, .div, .wr_en, .wr_addr, .busy, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nce, nwr, exp_addr, last_ce;
  task automatic tick(output bit w);
    ce = 1; @(posedge clk); #1; ce = 0;
    w = wr_en;
    @(posedge clk); @(posedge clk); #1;
  endtask

  bit w;
  bit retrig_done = 0;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 20; n++) begin
      tick(w);
      checks++; if (w || busy || done) begin failures++; $display("activity without trigger"); end
    end
    trig = 1; @(posedge clk); #1; trig = 0;
    checks++; if (!busy) begin failures++; $display("not busy"); end
    nwr = 0; exp_addr = 0;
    for (int n = 0; n < 200; n++) begin
      tick(w);
      if (w) begin
        checks++;
        if (n % 4 != 0 || wr_addr != 5'(exp_addr)) begin failures++; $display("n=%0d addr %0d exp %0d", n, wr_addr, exp_addr); end
        exp_addr++; nwr++;
      end
      if (n == 50 && !retrig_done) begin
        retrig_done = 1;
        // retrigger: restart from 0 on the next sample
        trig = 1; @(posedge clk); #1; trig = 0;
        exp_addr = 0;
        n = -1;
        nwr = 0;
      end
      if (nwr == 32) break;
    end
    checks++; if (nwr != 32) begin failures++; $display("writes %0d", nwr); end
    tick(w);
    checks++; if (busy || !done) begin failures++; $display("busy=%b done=%b at end", busy, done); end
    for (int n = 0; n < 10; n++) begin
      tick(w);
      checks++; if (w) begin failures++; $display("write after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
