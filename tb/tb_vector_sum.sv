// tb_vector_sum: random I/Q inputs on 24 channels (including full-scale
// extremes); checks the registered sums one sample enable later and that
// the output holds between enables.
module tb_vector_sum;
  logic clk = 0, rst = 1, ce = 0;
  logic signed [23:0][17:0] i_in, q_in;
  logic signed [22:0] i_sum, q_sum;
  int checks = 0, failures = 0;

  vector_sum dut (.clk, .rst, .ce, .i_in, .q_in, .i_sum, .q_sum);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int si, sq;
  initial begin
    i_in = '0; q_in = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      si = 0; sq = 0;
      for (int k = 0; k < 24; k++) begin
        case (n)
          0: begin i_in[k] = 18'sh1FFFF; q_in[k] = -18'sh20000; end
          1: begin i_in[k] = -18'sh20000; q_in[k] = 18'sh1FFFF; end
          default: begin i_in[k] = 18'($urandom); q_in[k] = 18'($urandom); end
        endcase
        si += int'($signed(i_in[k]));
        sq += int'($signed(q_in[k]));
      end
      ce <= 1; @(posedge clk); #1; ce <= 0;
      checks++; if (i_sum !== 23'(si) || q_sum !== 23'(sq)) begin failures++; $display("n=%0d %0d/%0d exp %0d/%0d", n, i_sum, q_sum, si, sq); end
      // change inputs without an enable: output must hold
      i_in[0] = ~i_in[0];
      @(posedge clk); #1;
      checks++; if (i_sum !== 23'(si)) begin failures++; $display("no hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
