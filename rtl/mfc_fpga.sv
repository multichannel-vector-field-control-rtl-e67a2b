// mfc_fpga: signal processing of the multichannel field control (MFC) board,
// which controls the RF field of many superconducting cavities driven by a
// single klystron.
//
// Data path, once per 65 MHz sample:
//   4 x serial_to_parallel  32 channels from four 8-channel 12-bit ADCs (LVDS)
//   parallel_latch          channel 33, the 14-bit klystron ADC
//   33 x downconv           I/Q of every channel by cos/sin tables
//   vector_sum              sum of the 24 cavity channels (I and Q)
//   2 x cic_filter          boxcar filter of the vector sum
//   error_calc              setpoint table - filtered vector sum
//   gain_stage              error x gain table x klystron linearizer
//   kly_loop                fast klystron loop on channel 33
//   ff_sum                  + feedforward table + klystron loop -> drive I/Q
//   4 x upconverter         drive I/Q -> DAC1 A/B (to the vector modulator),
//                           DAC2 A/B (spare outputs)
// Channels 25-32 are auxiliary inputs (e.g. cryomodule phase references); they
// are down-converted and can be viewed in the diagnostic buffers but do not
// enter the loop. pulse_timer steps the setpoint, gain and feedforward tables
// through the RF pulse after a start trigger; acq_ctrl fills eleven diag_buffer
// waveform buffers at (by default) 1 MSample/s. host_if gives the host bus
// access to every table, buffer and control register.
//
// Clocking: a single clock, the ADCs' LVDS bit clock (6 x the sample rate).
// The deserializers produce a one-cycle sample enable (sample_ce) per word;
// every other stage advances on it. From a sample at the down-converter input
// to the DAC word the delay is 9 samples (138 ns at 65 MHz), the group delay
// the document states: downconv 1, vector_sum 1, cic 2, error 1, gain 1,
// ff_sum 1, upconverter 2. Channel 33 passes the parallel latch one sample
// before its down-converter. Reset is synchronous and active high.
//
// The block structure, channel counts, widths of the converters and tables
// and the 9-cycle group delay follow the document; number formats, filter
// types, table indexing, the host bus and the diagnostic tap points are this
// design's choices, described in each module.
module mfc_fpga
  import mfc_pkg::*;
#(
  parameter int unsigned N_ADC  = 4,
  parameter int unsigned N_CAV  = 24,
  parameter int unsigned TBL_AW = 11,
  parameter int unsigned BUF_AW = 11,
  parameter int unsigned CIC_M  = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  // ADC LVDS lanes after the DDR input registers
  input  logic                        adc_frame,
  input  logic [N_ADC-1:0][7:0]       adc_rise,
  input  logic [N_ADC-1:0][7:0]       adc_fall,
  // klystron ADC
  input  logic [13:0]                 kly_adc,
  // start trigger (asynchronous to nothing: it comes from a board trigger input)
  input  logic                        start_trig,
  // host bus
  input  logic [HAW-1:0]              bus_addr,
  input  logic [HDW-1:0]              bus_wdata,
  input  logic                        bus_wr_en,
  input  logic                        bus_rd_en,
  output logic [HDW-1:0]              bus_rdata,
  output logic                        bus_rvalid,
  // DAC words
  output logic signed [13:0]          dac1_a,
  output logic signed [13:0]          dac1_b,
  output logic signed [13:0]          dac2_a,
  output logic signed [13:0]          dac2_b,
  output logic                        sample_ce
);
  localparam int unsigned NCH  = N_ADC * 8 + 1;   // 33 channels
  localparam int unsigned KCH  = NCH - 1;         // klystron channel index
  localparam int unsigned W    = 18;
  localparam int unsigned VS_W = W + $clog2(N_CAV);

  initial assert (N_CAV <= N_ADC * 8) else $error("more cavity channels than ADC channels");

  host_req_t  host_req;
  cfg_t       cfg;
  logic       soft_trig;

  // ---------------------------------------------------------------- inputs
  logic [N_ADC-1:0][7:0][11:0] words;
  logic [N_ADC-1:0]            word_valid;

  for (genvar a = 0; a < N_ADC; a++) begin : g_s2p
    serial_to_parallel #(.LANES(8), .BITS(12), .RATIO(6)) u_s2p (
      .clk, .rst, .frame(adc_frame), .rise(adc_rise[a]), .fall(adc_fall[a]),
      .word(words[a]), .valid(word_valid[a]));
  end
  assign sample_ce = word_valid[0];
  logic ce;
  assign ce = sample_ce;

  logic signed [13:0] kly_sample;
  parallel_latch #(.W(14)) u_plat (.clk, .rst, .ce, .din(kly_adc), .dout(kly_sample));

  // ---------------------------------------------------- triggers, counters
  logic trig_q, trig;
  always_ff @(posedge clk) trig_q <= rst ? 1'b0 : start_trig;
  assign trig = (start_trig && !trig_q) || soft_trig;

  logic [7:0] dc_addr, uc_addr;
  always_ff @(posedge clk) begin
    if (rst) begin
      dc_addr <= '0;
      uc_addr <= '0;
    end else if (ce) begin
      dc_addr <= (dc_addr == cfg.dc_len_m1) ? 8'd0 : dc_addr + 1'b1;
      uc_addr <= (uc_addr == cfg.uc_len_m1) ? 8'd0 : uc_addr + 1'b1;
    end
  end

  logic [TBL_AW-1:0] t_addr;
  logic              pulse_active;
  pulse_timer #(.AW(TBL_AW)) u_pt (.clk, .rst, .ce, .trig, .div(cfg.tbl_div), .t_addr, .active(pulse_active));

  logic              acq_we, acq_busy, acq_done;
  logic [BUF_AW-1:0] acq_addr;
  acq_ctrl #(.AW(BUF_AW)) u_acq (.clk, .rst, .ce, .trig, .div(cfg.acq_div),
    .wr_en(acq_we), .wr_addr(acq_addr), .busy(acq_busy), .done(acq_done));

  // ----------------------------------------------------- down-conversion
  localparam int unsigned NRD = NCH + 5 + 4 + 11;   // read data sources
  logic [NRD-1:0][HDW-1:0] rd;

  logic signed [NCH-1:0][W-1:0] ch_i, ch_q;
  logic signed [NCH-1:0][W-1:0] ch_raw;   // raw samples, sign extended, for the ADC buffer

  for (genvar c = 0; c < KCH; c++) begin : g_dc
    downconv #(.IN_W(12), .COEF_W(18), .TBL_AW(8), .OUT_W(W), .CH(c)) u_dc (
      .clk, .rst, .ce, .tbl_addr_next(dc_addr), .x(words[c/8][c%8]),
      .i_out(ch_i[c]), .q_out(ch_q[c]), .host_req, .host_rdata(rd[c]));
    assign ch_raw[c] = W'($signed(words[c/8][c%8]));
  end
  downconv #(.IN_W(14), .COEF_W(18), .TBL_AW(8), .OUT_W(W), .CH(KCH)) u_dc_kly (
    .clk, .rst, .ce, .tbl_addr_next(dc_addr), .x(kly_sample),
    .i_out(ch_i[KCH]), .q_out(ch_q[KCH]), .host_req, .host_rdata(rd[KCH]));
  assign ch_raw[KCH] = W'(kly_sample);

  // -------------------------------------------------------- cavity loop
  logic signed [VS_W-1:0] vs_i, vs_q;
  vector_sum #(.N(N_CAV), .IN_W(W)) u_vs (.clk, .rst, .ce,
    .i_in(ch_i[N_CAV-1:0]), .q_in(ch_q[N_CAV-1:0]), .i_sum(vs_i), .q_sum(vs_q));

  logic signed [W-1:0] vec_i, vec_q;
  cic_filter #(.IN_W(VS_W), .OUT_W(W), .M(CIC_M), .SHIFT($clog2(CIC_M) + $clog2(N_CAV) + 1 - 1)) u_cic_i (
    .clk, .rst, .ce, .x(vs_i), .y(vec_i));
  cic_filter #(.IN_W(VS_W), .OUT_W(W), .M(CIC_M), .SHIFT($clog2(CIC_M) + $clog2(N_CAV) + 1 - 1)) u_cic_q (
    .clk, .rst, .ce, .x(vs_q), .y(vec_q));

  logic signed [W-1:0] err_i, err_q, eg_i, eg_q, kly_i, kly_q, drv_i, drv_q;
  error_calc #(.W(W), .TBL_AW(TBL_AW), .ID_I(TID_SP_I), .ID_Q(TID_SP_Q)) u_err (
    .clk, .rst, .ce, .t_addr, .i_meas(vec_i), .q_meas(vec_q), .i_err(err_i), .q_err(err_q),
    .host_req, .host_rdata(rd[NCH]));

  // linearizer index: drive amplitude estimate max(|I|,|Q|) + min(|I|,|Q|)/2
  logic [7:0]  lin_addr;
  logic [W-1:0] abs_i, abs_q, bigger, smaller;
  logic [W:0]   mag;
  always_comb begin
    abs_i = drv_i[W-1] ? W'(-drv_i) : W'(drv_i);
    abs_q = drv_q[W-1] ? W'(-drv_q) : W'(drv_q);
    bigger   = (abs_i > abs_q) ? abs_i : abs_q;
    smaller = (abs_i > abs_q) ? abs_q : abs_i;
    mag   = (W+1)'(bigger) + (W+1)'(smaller >> 1);
  end
  always_ff @(posedge clk) begin
    if (rst)     lin_addr <= '0;
    else if (ce) lin_addr <= (mag[W:W-1] != 2'b00) ? 8'hFF : mag[W-2 -: 8];
  end

  gain_stage #(.W(W), .TBL_AW(TBL_AW), .LIN_AW(8), .ID_I(TID_G_I), .ID_Q(TID_G_Q), .LIN_ID(0)) u_gain (
    .clk, .rst, .ce, .t_addr, .lin_addr, .i_err(err_i), .q_err(err_q), .i_out(eg_i), .q_out(eg_q),
    .host_req, .host_rdata(rd[NCH+1]));

  kly_loop #(.W(W), .TBL_AW(TBL_AW), .LIN_AW(8)) u_kly (
    .clk, .rst, .ce, .lpf_k(cfg.lpf_k), .t_addr, .lin_addr, .i_in(ch_i[KCH]), .q_in(ch_q[KCH]),
    .i_out(kly_i), .q_out(kly_q), .host_req, .host_rdata(rd[NCH+2]));

  ff_sum #(.W(W), .TBL_AW(TBL_AW)) u_ff (
    .clk, .rst, .ce, .t_addr, .fb_en(cfg.fb_en), .ff_en(cfg.ff_en), .kly_en(cfg.kly_en),
    .i_fb(eg_i), .q_fb(eg_q), .i_kly(kly_i), .q_kly(kly_q), .i_drv(drv_i), .q_drv(drv_q),
    .host_req, .host_rdata(rd[NCH+3]));
  assign rd[NCH+4] = '0;

  // -------------------------------------------------------- up-conversion
  logic signed [3:0][13:0] dac;
  for (genvar u = 0; u < 4; u++) begin : g_uc
    upconverter #(.W(W), .TBL_AW(8), .DAC_W(14), .UC(u)) u_uc (
      .clk, .rst, .ce, .tbl_addr_next(uc_addr), .i_in(drv_i), .q_in(drv_q), .dac(dac[u]),
      .host_req, .host_rdata(rd[NCH+5+u]));
  end
  assign dac1_a = dac[0];
  assign dac1_b = dac[1];
  assign dac2_a = dac[2];
  assign dac2_b = dac[3];

  // ---------------------------------------------------- diagnostic buffers
  logic [W-1:0] sel_raw, sel_i, sel_q;
  always_comb begin
    sel_raw = '0;
    sel_i   = '0;
    sel_q   = '0;
    for (int c = 0; c < NCH; c++)
      if (cfg.diag_ch == 6'(c)) begin
        sel_raw = ch_raw[c];
        sel_i   = ch_i[c];
        sel_q   = ch_q[c];
      end
  end

  logic [10:0][W-1:0] taps;
  assign taps[BUF_ADC]  = sel_raw;
  assign taps[BUF_IX]   = sel_i;
  assign taps[BUF_QX]   = sel_q;
  assign taps[BUF_IVEC] = vec_i;
  assign taps[BUF_QVEC] = vec_q;
  assign taps[BUF_IERR] = err_i;
  assign taps[BUF_QERR] = err_q;
  assign taps[BUF_IEG]  = eg_i;
  assign taps[BUF_QEG]  = eg_q;
  assign taps[BUF_IOUT] = drv_i;
  assign taps[BUF_QOUT] = drv_q;

  for (genvar b = 0; b < 11; b++) begin : g_buf
    diag_buffer #(.W(W), .AW(BUF_AW), .ID(b)) u_buf (
      .clk, .wr_en(acq_we), .wr_addr(acq_addr), .din(taps[b]),
      .host_req, .host_rdata(rd[NCH+9+b]));
  end

  // ------------------------------------------------------------ host bus
  logic [HDW-1:0] rd_or;
  always_comb begin
    rd_or = '0;
    for (int k = 0; k < NRD; k++) rd_or |= rd[k];
  end

  host_if u_host (
    .clk, .rst, .bus_addr, .bus_wdata, .bus_wr_en, .bus_rd_en, .bus_rdata, .bus_rvalid,
    .host_req, .rd_or, .status({pulse_active, acq_done, acq_busy}), .cfg, .soft_trig);
endmodule
