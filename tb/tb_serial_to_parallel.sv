// tb_serial_to_parallel: sends random 12-bit words on 8 DDR lanes, two bits
// per clock, MSB first, with a frame marker on the first pair, and checks
// that each word appears on the parallel output with a one-cycle valid pulse
// in the cycle after the last bit pair.
module tb_serial_to_parallel;
  logic clk = 0, rst = 1, frame = 0;
  logic [7:0] rise = 0, fall = 0;
  logic [7:0][11:0] word;
  logic valid;
  int checks = 0, failures = 0, nvalid = 0;

  serial_to_parallel dut (.clk, .rst, .frame, .rise, .fall, .word, .valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (valid) nvalid++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0][11:0] sent;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // a few idle cycles without frame: no valid may appear
    repeat (8) @(posedge clk);
    checks++; if (nvalid != 0) begin failures++; $display("valid before frame"); end
    for (int n = 0; n < 50; n++) begin
      for (int l = 0; l < 8; l++) sent[l] = 12'($urandom);
      for (int p = 0; p < 6; p++) begin
        frame <= (p == 0);
        for (int l = 0; l < 8; l++) begin
          rise[l] <= sent[l][11 - 2*p];
          fall[l] <= sent[l][10 - 2*p];
        end
        @(posedge clk);
      end
      frame <= 0;
      // the last pair was taken at this edge; word/valid update at the same edge
      #1;
      checks++;
      if (!valid || word !== sent) begin
        failures++;
        $display("word %0d: valid=%b got %h exp %h", n, valid, word, sent);
      end
    end
    @(posedge clk); #1;
    checks++; if (nvalid != 50) begin failures++; $display("valid pulses %0d", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
