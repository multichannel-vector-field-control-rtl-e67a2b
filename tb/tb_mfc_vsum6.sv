// tb_mfc_vsum6: process gain of the cavity vector sum, measured through the
// full MFC FPGA at its default parameters.
//
// A 13 MHz IF sampled at 1313/21 MHz is 21 cycles in 101 samples. The
// testbench drives that signal (amplitude 1000 LSB, a different phase on
// every channel, independent noise of about 35 LSB rms per channel) on the
// LVDS lanes of the first six cavity channels. It loads 101-entry cos/sin
// tables (R_DC_LEN = 100) that rotate each channel back to a common phase, so
// that the channels add coherently, and sets every other cavity channel's
// tables to zero. The filtered vector sum (the I and Q vector buffers) is
// acquired at every sample (R_ACQ_DIV = 0) and read back over the host bus.
// This is done twice: with only channel 1 in the sum, then with all six.
//
// Per record of 2048 words:
//   signal: the mean of I and Q over 20 whole IF patterns (2020 samples),
//     which removes the 2 x IF ripple of the down-conversion;
//   noise: half the mean square of y[j] - y[j-101], because the signal part
//     repeats every 101 samples and cancels.
// Checks: the one-channel amplitude matches 1000 x (2^17-1) / 2 / 2^12 / 32
// (down-conversion scale, then CIC gain 8 / 2^8), the six-channel amplitude
// is six times that, and the signal-to-noise ratio improves by
// 10 log10(6) = 7.8 dB, since the signal adds coherently and the noise adds
// in power. Eight records are averaged per case.
module tb_mfc_vsum6;
  import mfc_pkg::*;

  localparam int    NCH   = 6;
  localparam int    P     = 101;       // samples per IF pattern
  localparam int    CYC   = 21;        // IF cycles per pattern
  localparam real   AMP   = 1000.0;    // ADC amplitude in LSB
  localparam real   GC    = 131071.0;  // table amplitude
  localparam real   BETA  = 0.5;       // common phase after rotation
  localparam int    NREC  = 8;
  localparam int    DEPTH = 2048;
  localparam real   PI    = 3.14159265358979;

  logic clk = 0, rst = 1;
  logic adc_frame = 0;
  logic [3:0][7:0] adc_rise = '0, adc_fall = '0;
  logic [13:0] kly_adc = '0;
  logic start_trig = 0;
  logic [19:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0;
  logic bus_wr_en = 0, bus_rd_en = 0;
  logic [31:0] bus_rdata;
  logic bus_rvalid;
  logic signed [13:0] dac1_a, dac1_b, dac2_a, dac2_b;
  logic sample_ce;

  mfc_fpga dut (.clk, .rst, .adc_frame, .adc_rise, .adc_fall, .kly_adc, .start_trig,
                .bus_addr, .bus_wdata, .bus_wr_en, .bus_rd_en, .bus_rdata, .bus_rvalid,
                .dac1_a, .dac1_b, .dac2_a, .dac2_b, .sample_ce);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ ADC lanes
  real phi [NCH];                       // input phase of each driven channel
  logic [11:0] cur_words [32], next_words [32];
  int n_in = 0;                         // input sample counter (mod P)

  function automatic int noise();
    int s = 0;
    for (int k = 0; k < 4; k++) s += int'($urandom % 61) - 30;
    return s;                           // variance 4 * 310 = 1240
  endfunction

  function automatic logic [11:0] adc_word(int c, int n);
    int x;
    if (c >= NCH) return 12'd0;
    x = int'($rtoi(AMP * $cos(2.0 * PI * CYC * n / P + phi[c]) + 1000.5) - 1000) + noise();
    if (x > 2047) x = 2047;
    if (x < -2048) x = -2048;
    return 12'(x);
  endfunction

  initial begin
    automatic int pair = 0;
    foreach (phi[c]) phi[c] = 0.9 * c + 0.3;
    foreach (cur_words[c]) cur_words[c] = '0;
    foreach (next_words[c]) next_words[c] = adc_word(c, 0);
    forever begin
      @(posedge clk); #1;
      if (pair == 0) begin
        cur_words = next_words;
        n_in = (n_in + 1) % P;
      end
      adc_frame = (pair == 0);
      for (int a = 0; a < 4; a++)
        for (int l = 0; l < 8; l++) begin
          adc_rise[a][l] = cur_words[a*8+l][11 - 2*pair];
          adc_fall[a][l] = cur_words[a*8+l][10 - 2*pair];
        end
      if (pair == 5) foreach (next_words[c]) next_words[c] = adc_word(c, n_in);
      pair = (pair + 1) % 6;
    end
  end

  // ------------------------------------------------------------ host bus
  task automatic bwrite(input logic [19:0] a, input logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_wr_en = 1;
    @(posedge clk); #1;
    bus_wr_en = 0;
  endtask

  task automatic bread(input logic [19:0] a, output logic [31:0] d);
    int lat = 0;
    bus_addr = a; bus_rd_en = 1;
    @(posedge clk); #1;
    bus_rd_en = 0;
    while (!bus_rvalid && lat < 10) begin @(posedge clk); #1; lat++; end
    d = bus_rdata;
  endtask

  task automatic wait_samples(int n);
    repeat (6 * n) @(posedge clk);
    #1;
  endtask

  function automatic int sx18(logic [31:0] d);
    return int'(signed'(d[17:0]));
  endfunction

  // tables: channel c rotated by -phi[c] + BETA; zero for channels not in the sum
  task automatic load_tables(int nsum);
    for (int c = 0; c < 24; c++)
      for (int k = 0; k < P; k++) begin
        real th = 2.0 * PI * CYC * k / P + (c < NCH ? phi[c] : 0.0) - BETA;
        int cv = (c < nsum) ? int'($rtoi(GC * $cos(th) + 200000.5) - 200000) : 0;
        int sv = (c < nsum) ? int'($rtoi(-GC * $sin(th) + 200000.5) - 200000) : 0;
        bwrite({DC_REGION, 1'b0, 6'(c), 1'b0, 8'(k)}, 32'(cv));
        bwrite({DC_REGION, 1'b0, 6'(c), 1'b1, 8'(k)}, 32'(sv));
      end
  endtask

  // one case: acquire NREC records, return mean signal magnitude and noise variance
  task automatic measure(int nsum, output real mag, output real nvar);
    int yi [DEPTH], yq [DEPTH];
    logic [31:0] d;
    real si, sq, di, dq, msum = 0.0, vsum = 0.0;
    load_tables(nsum);
    wait_samples(300);
    for (int r = 0; r < NREC; r++) begin
      bwrite({REG_REGION, 12'd0, R_CTRL}, 32'b1000);   // soft trigger
      wait_samples(DEPTH + 20);
      bread({REG_REGION, 12'd0, R_STATUS}, d);
      checks++;
      if (d[1:0] != 2'b10) begin failures++; $display("acquisition not done: status %b", d[2:0]); end
      for (int j = 0; j < DEPTH; j++) begin
        bread({BUF_REGION, 1'b0, 4'(BUF_IVEC), 11'(j)}, d); yi[j] = sx18(d);
        bread({BUF_REGION, 1'b0, 4'(BUF_QVEC), 11'(j)}, d); yq[j] = sx18(d);
      end
      si = 0.0; sq = 0.0;
      for (int j = 0; j < 20 * P; j++) begin si += yi[j]; sq += yq[j]; end
      si /= 20 * P; sq /= 20 * P;
      di = 0.0; dq = 0.0;
      for (int j = P; j < DEPTH; j++) begin
        di += real'(yi[j] - yi[j-P]) ** 2;
        dq += real'(yq[j] - yq[j-P]) ** 2;
      end
      msum += $sqrt(si * si + sq * sq);
      vsum += (di + dq) / (2.0 * (DEPTH - P));
    end
    mag = msum / NREC;
    nvar = vsum / NREC;
  endtask

  initial begin
    real m1, v1, m6, v6, exp1, gain_db;
    repeat (4) @(posedge clk); #1;
    rst = 0;
    bwrite({REG_REGION, 12'd0, R_DC_LEN}, 32'd100);
    bwrite({REG_REGION, 12'd0, R_ACQ_DIV}, 32'd0);
    bwrite({REG_REGION, 12'd0, R_CTRL}, 32'd0);

    measure(1, m1, v1);
    measure(NCH, m6, v6);

    exp1 = AMP * GC / 2.0 / 4096.0 * 8.0 / 256.0;
    gain_db = 10.0 * $log10((m6 * m6 / v6) / (m1 * m1 / v1));
    $display("1 channel : amplitude %0.1f (expected %0.1f), noise %0.2f LSB rms", m1, exp1, $sqrt(v1));
    $display("%0d channels: amplitude %0.1f, noise %0.2f LSB rms", NCH, m6, $sqrt(v6));
    $display("process gain of the vector sum: %0.2f dB (expected %0.2f dB)", gain_db, 10.0 * $log10(NCH));

    checks++;
    if (m1 < 0.99 * exp1 || m1 > 1.01 * exp1) begin failures++; $display("1-channel amplitude off"); end
    checks++;
    if (m6 < 0.99 * NCH * m1 || m6 > 1.01 * NCH * m1) begin failures++; $display("6-channel sum not coherent"); end
    checks++;
    if (v1 < 1.0) begin failures++; $display("no noise seen"); end
    checks++;
    if (gain_db < 10.0 * $log10(NCH) - 0.8 || gain_db > 10.0 * $log10(NCH) + 0.8) begin
      failures++; $display("process gain out of range");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
