// tb_mfc_fpga: end-to-end test of the MFC FPGA at its default parameters.
//
// The testbench serializes random 12-bit samples onto the 32 LVDS lanes
// (two bits per clock, MSB first, frame marker on the first pair), drives the
// klystron ADC, loads every table through the host bus and runs a bit-exact
// reference model of the whole sample chain (down-conversion, vector sum,
// CIC, setpoint error, gain x linearizer, klystron loop, feedforward sum,
// up-conversion) plus the pulse timer and the acquisition controller. The
// model is written from the design's specification, not from its RTL, and
// the four DAC outputs are compared with it on every clock. Phases:
//   A  random tables, all loop terms enabled, a start trigger with a fast
//      table divider: the pulse steps through all 2048 table entries
//   B  group delay: unity tables, a step on the cavity channels; the DAC
//      must answer on the 9th sample (9 x 15.4 ns = 138 ns at 65 MHz)
//   C  one complete RF pulse and acquisition at the default 1 MSample/s
//      rates; all eleven diagnostic buffers are read back over the bus and
//      compared with the model
// Each mechanism (sample deserialization, trigger, pulse stepping, pulse end,
// acquisition writes, acquisition done, linearizer indexing, feedback,
// feedforward and klystron terms, buffer and table read-back, group delay)
// is counted and must occur at least once.
module tb_mfc_fpga;
  import mfc_pkg::*;

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
  int n_samples = 0, n_trig = 0, n_step = 0, n_pulse_end = 0, n_acq_wr = 0, n_acq_done = 0;
  int n_lin = 0, n_fb = 0, n_ff = 0, n_kly = 0, n_buf_rd = 0, n_tbl_rd = 0, n_gd = 0, n_dac_sat = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ model data
  typedef longint li;
  function automatic li sat(li v, int bits);
    li mx = (li'(1) <<< (bits - 1)) - 1;
    return v > mx ? mx : v < -mx - 1 ? -mx - 1 : v;
  endfunction

  // tables as written over the bus
  li t_dc [33][2][256];
  li t_pt [10][2048];
  li t_lin [2][256];
  li t_uc [4][2][256];

  // configuration registers
  bit  m_fb, m_ff, m_kly;
  int  m_dclen, m_uclen, m_tdiv, m_adiv, m_diag, m_k;

  // model state (values after the last clock edge)
  li dcA, ucA;
  li cosr [33], sinr [33], chI [33], chQ [33], raw [33], plat;
  li vsI, vsQ, integI, integQ, dlyI [8], dlyQ [8], vecI, vecQ;
  li spI, spQ, errI, errQ, gI_t, gQ_t, lin_t, gI, gQ, egI, egQ;
  int lin_addr;
  li kaccI, kaccQ, kspI, kspQ, kerrI, kerrQ, kgI_t, kgQ_t, klin_t, kgI, kgQ, koI, koQ;
  li ffI, ffQ, drvI, drvQ;
  li ucAr [4], ucBr [4], pa [4], pb [4], dacm [4];
  int t_addr, pt_cnt; bit pt_act;
  int acq_cnt, acq_addr; bit acq_busy, acq_done;
  bit trig_q;
  li buf_m [11][2048];

  task automatic model_reset();
    dcA = 0; ucA = 0; plat = 0;
    foreach (chI[c]) begin chI[c] = 0; chQ[c] = 0; end
    vsI = 0; vsQ = 0; integI = 0; integQ = 0;
    foreach (dlyI[k]) begin dlyI[k] = 0; dlyQ[k] = 0; end
    vecI = 0; vecQ = 0; errI = 0; errQ = 0; gI = 0; gQ = 0; egI = 0; egQ = 0; lin_addr = 0;
    kaccI = 0; kaccQ = 0; kerrI = 0; kerrQ = 0; kgI = 0; kgQ = 0; koI = 0; koQ = 0;
    drvI = 0; drvQ = 0;
    foreach (pa[u]) begin pa[u] = 0; pb[u] = 0; dacm[u] = 0; end
    t_addr = 0; pt_cnt = 0; pt_act = 0;
    acq_cnt = 0; acq_addr = 0; acq_busy = 0; acq_done = 0;
    m_fb = 0; m_ff = 0; m_kly = 0; m_dclen = 255; m_uclen = 255; m_tdiv = 64; m_adiv = 64; m_diag = 0; m_k = 4;
  endtask

  function automatic li sx(li v, int bits);   // sign-extend the low bits
    li m = li'(1) <<< bits;
    v = v & (m - 1);
    return v >= (m >>> 1) ? v - m : v;
  endfunction

  // one sample of the data path; x holds the 32 words of this sample, k14 the klystron ADC code
  task automatic model_sample(input li x [32], input li k14);
    li n_chI [33], n_chQ [33], n_cos [33], n_sin [33];
    li n_vsI = 0, n_vsQ = 0, n_vecI, n_vecQ, n_lin_abs_i, n_lin_abs_q, bg, sm, mag;
    li n_plat, n_kaccI, n_kaccQ;
    int nl;
    // down-converters
    for (int c = 0; c < 33; c++) begin
      li xs = (c < 32) ? x[c] : plat;
      int sh = (c < 32) ? 12 : 14;
      n_chI[c] = sx((xs * cosr[c]) >>> sh, 18);
      n_chQ[c] = sx((xs * sinr[c]) >>> sh, 18);
      n_cos[c] = t_dc[c][0][dcA];
      n_sin[c] = t_dc[c][1][dcA];
      raw[c]   = xs;   // raw sample shown in the ADC buffer
    end
    n_plat = k14 - 8192;
    raw[32] = n_plat;   // the klystron raw sample is the latch output, one sample ahead
    for (int c = 0; c < 24; c++) begin n_vsI += chI[c]; n_vsQ += chQ[c]; end
    // CIC
    n_vecI = sat((integI - dlyI[7]) >>> 8, 18);
    n_vecQ = sat((integQ - dlyQ[7]) >>> 8, 18);
    for (int k = 7; k > 0; k--) begin dlyI[k] = dlyI[k-1]; dlyQ[k] = dlyQ[k-1]; end
    dlyI[0] = integI; dlyQ[0] = integQ;
    integI += vsI; integQ += vsQ;
    // linearizer index from the present drive
    n_lin_abs_i = drvI < 0 ? -drvI : drvI;
    n_lin_abs_q = drvQ < 0 ? -drvQ : drvQ;
    bg = n_lin_abs_i > n_lin_abs_q ? n_lin_abs_i : n_lin_abs_q;
    sm = n_lin_abs_i > n_lin_abs_q ? n_lin_abs_q : n_lin_abs_i;
    mag = bg + (sm >>> 1);
    nl = mag >= 131072 ? 255 : int'(mag >>> 9);
    // up-converters (stage 2 then stage 1)
    for (int u = 0; u < 4; u++) begin
      dacm[u] = sat((pa[u] + pb[u]) >>> 20, 14);
      pa[u] = drvI * ucAr[u];
      pb[u] = drvQ * ucBr[u];
      ucAr[u] = t_uc[u][0][ucA];
      ucBr[u] = t_uc[u][1][ucA];
    end
    // drive sum
    drvI = sat((m_fb ? egI : 0) + (m_ff ? ffI : 0) + (m_kly ? koI : 0), 18);
    drvQ = sat((m_fb ? egQ : 0) + (m_ff ? ffQ : 0) + (m_kly ? koQ : 0), 18);
    if (m_fb && egI != 0) n_fb++;
    if (m_ff && ffI != 0) n_ff++;
    if (m_kly && koI != 0) n_kly++;
    // klystron loop, oldest stage first
    koI = sat((kerrI * kgI) >>> 12, 18);           koQ = sat((kerrQ * kgQ) >>> 12, 18);
    kgI = sat((kgI_t * klin_t) >>> 16, 18);        kgQ = sat((kgQ_t * klin_t) >>> 16, 18);
    kerrI = sat(kspI - (kaccI >>> 8), 18);         kerrQ = sat(kspQ - (kaccQ >>> 8), 18);
    n_kaccI = kaccI + (((chI[32] <<< 8) - kaccI) >>> m_k);
    n_kaccQ = kaccQ + (((chQ[32] <<< 8) - kaccQ) >>> m_k);
    // gain
    egI = sat((errI * gI) >>> 12, 18);             egQ = sat((errQ * gQ) >>> 12, 18);
    gI = sat((gI_t * lin_t) >>> 16, 18);           gQ = sat((gQ_t * lin_t) >>> 16, 18);
    // error
    errI = sat(spI - vecI, 18);                    errQ = sat(spQ - vecQ, 18);
    // table reads at the present pulse index
    spI = t_pt[TID_SP_I][t_addr];   spQ = t_pt[TID_SP_Q][t_addr];
    gI_t = t_pt[TID_G_I][t_addr];   gQ_t = t_pt[TID_G_Q][t_addr];
    ffI = t_pt[TID_FF_I][t_addr];   ffQ = t_pt[TID_FF_Q][t_addr];
    kspI = t_pt[TID_KSP_I][t_addr]; kspQ = t_pt[TID_KSP_Q][t_addr];
    kgI_t = t_pt[TID_KG_I][t_addr]; kgQ_t = t_pt[TID_KG_Q][t_addr];
    lin_t = t_lin[0][lin_addr];     klin_t = t_lin[1][lin_addr];
    if (lin_addr != 0) n_lin++;
    lin_addr = nl;
    // commit
    vecI = n_vecI; vecQ = n_vecQ; vsI = n_vsI; vsQ = n_vsQ;
    kaccI = n_kaccI; kaccQ = n_kaccQ;
    chI = n_chI; chQ = n_chQ; cosr = n_cos; sinr = n_sin; plat = n_plat;
    dcA = (dcA == m_dclen) ? 0 : dcA + 1;
    ucA = (ucA == m_uclen) ? 0 : ucA + 1;
  endtask

  // pulse timer and acquisition for one clock edge (trg: trigger seen at this edge)
  task automatic model_timers(input bit trg, input bit ce, output bit acq_wr);
    acq_wr = 0;
    if (trg) begin
      pt_cnt = 0; t_addr = 0; pt_act = 1;
      acq_cnt = 0; acq_addr = 0; acq_busy = 1; acq_done = 0;
      n_trig++;
      return;
    end
    if (pt_act && ce) begin
      if (pt_cnt == m_tdiv) begin
        pt_cnt = 0;
        if (t_addr == 2047) begin pt_act = 0; n_pulse_end++; end
        else begin t_addr++; n_step++; end
      end else pt_cnt++;
    end
    if (acq_busy && ce) begin
      if (acq_cnt == 0) begin
        acq_wr = 1;
        if (acq_addr == 2047) begin acq_busy = 0; acq_done = 1; n_acq_done++; end
      end
      acq_cnt = (acq_cnt == m_adiv) ? 0 : acq_cnt + 1;
    end
  endtask

  // ------------------------------------------------------- bus and model link
  typedef struct { longint t; logic [19:0] a; logic [31:0] d; } pend_t;
  pend_t pend [$];

  task automatic apply_write(logic [19:0] a, logic [31:0] d);
    li v = sx(li'(d), 18);
    unique case (a[19:16])
      REG_REGION: case (a[3:0])
        R_CTRL:    begin m_fb = d[0]; m_ff = d[1]; m_kly = d[2]; end
        R_DC_LEN:  m_dclen = int'(d[7:0]);
        R_UC_LEN:  m_uclen = int'(d[7:0]);
        R_TBL_DIV: m_tdiv = int'(d[7:0]);
        R_ACQ_DIV: m_adiv = int'(d[7:0]);
        R_DIAG_CH: m_diag = int'(d[5:0]);
        R_LPF_K:   m_k = int'(d[3:0]);
        default: ;
      endcase
      DC_REGION:  t_dc[a[14:9]][a[8]][a[7:0]] = v;
      PT_REGION:  t_pt[a[14:11]][a[10:0]] = v;
      LIN_REGION: t_lin[a[8]][a[7:0]] = v;
      UC_REGION:  t_uc[a[10:9]][a[8]][a[7:0]] = v;
      default: ;
    endcase
  endtask

  // bus write: the RTL updates its table/register at the edge after the one
  // that samples the bus strobe; the model does so after that edge too
  task automatic bwrite(input logic [19:0] a, input logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_wr_en = 1;
    @(posedge clk); #1;
    bus_wr_en = 0;
    pend.push_back('{t: $time - 1 + 10, a: a, d: d});
  endtask

  task automatic bread(input logic [19:0] a, output logic [31:0] d);
    int lat = 1;
    bus_addr = a; bus_rd_en = 1;
    @(posedge clk); #1;
    bus_rd_en = 0;
    while (!bus_rvalid && lat < 10) begin @(posedge clk); #1; lat++; end
    checks++; if (lat != 3) begin failures++; $display("read latency %0d", lat); end
    d = bus_rdata;
  endtask

  // --------------------------------------------- LVDS driver and model loop
  li cur_words [32], next_words [32], done_words [32];
  li kly_cur;
  int pair = 0;
  bit ce_neg, rst_neg, st_neg;
  bit check_on = 0;
  li cavity_level = -1;      // -1: random samples; otherwise this value on the cavity channels
  int gd_start = -1, gd_count = 0;
  bit gd_arm = 0;
  li gd_ref;
  int ce_gap = 0;

  always @(negedge clk) begin
    ce_neg  = sample_ce;
    rst_neg = rst;
    st_neg  = start_trig;
  end

  function automatic li new_word(int c);
    if (cavity_level >= 0 && c < 24) return cavity_level;
    if (cavity_level >= 0) return 0;
    return sx(li'($urandom), 12);
  endfunction

  initial begin
    bit trg, wr;
    li tap [11];
    model_reset();
    foreach (cur_words[c]) cur_words[c] = new_word(c);
    forever begin
      @(posedge clk); #1;
      // --- the edge just passed: model it with the inputs of the cycle before
      trg = st_neg && !trig_q;
      trig_q = rst_neg ? 0 : st_neg;
      if (rst_neg) begin
        model_reset();
        ce_gap = -100;   // the first gap after a reset is not checked
      end else begin
        if (ce_neg) begin
          n_samples++;
          checks++; if (ce_gap != 6 && ce_gap > 0 && n_samples > 2) begin failures++; $display("sample enable gap %0d", ce_gap); end
          ce_gap = 0;
          if (gd_arm && done_words[0] == 1000) begin
            gd_arm = 0; gd_start = n_samples; gd_count = 0; gd_ref = dacm[0];
          end
          model_sample(done_words, kly_cur);
          if (gd_start >= 0) begin
            gd_count++;
            if (dacm[0] != gd_ref) begin
              n_gd++;
              checks++; if (gd_count != 9) begin failures++; $display("group delay %0d samples", gd_count); end
              gd_start = -1;
            end
          end
        end
        model_timers(trg, ce_neg, wr);
        if (wr) begin
          tap[BUF_ADC] = raw[m_diag]; tap[BUF_IX] = chI[m_diag]; tap[BUF_QX] = chQ[m_diag];
          tap[BUF_IVEC] = vecI; tap[BUF_QVEC] = vecQ; tap[BUF_IERR] = errI; tap[BUF_QERR] = errQ;
          tap[BUF_IEG] = egI; tap[BUF_QEG] = egQ; tap[BUF_IOUT] = drvI; tap[BUF_QOUT] = drvQ;
          for (int b = 0; b < 11; b++) buf_m[b][acq_addr] = tap[b];
          acq_addr = (acq_addr + 1) % 2048;
          n_acq_wr++;
        end
      end
      ce_gap++;
      while (pend.size() > 0 && pend[0].t == $time - 1) begin
        apply_write(pend[0].a, pend[0].d);
        void'(pend.pop_front());
      end
      // --- compare the outputs after this edge
      if (check_on) begin
        checks++;
        if (li'(dac1_a) != dacm[0] || li'(dac1_b) != dacm[1] || li'(dac2_a) != dacm[2] || li'(dac2_b) != dacm[3]) begin
          failures++;
          if (failures < 20) $display("%0t DAC %0d %0d %0d %0d model %0d %0d %0d %0d", $time,
                                      dac1_a, dac1_b, dac2_a, dac2_b, dacm[0], dacm[1], dacm[2], dacm[3]);
        end
        if (dacm[0] == 8191 || dacm[0] == -8192) n_dac_sat++;
      end
      // --- drive the next bit pair
      if (pair == 5) done_words = cur_words;        // completes at the coming edge
      if (pair == 0) begin
        cur_words = next_words;
        kly_cur = li'($urandom % 16384);
      end
      adc_frame = (pair == 0);
      for (int a = 0; a < 4; a++)
        for (int l = 0; l < 8; l++) begin
          adc_rise[a][l] = cur_words[a*8+l][11 - 2*pair];
          adc_fall[a][l] = cur_words[a*8+l][10 - 2*pair];
        end
      kly_adc = 14'(kly_cur);
      if (pair == 5) foreach (next_words[c]) next_words[c] = new_word(c);
      pair = (pair + 1) % 6;
    end
  end

  // ------------------------------------------------------------ sequence
  task automatic wait_samples(int n);
    int s0 = n_samples;
    while (n_samples < s0 + n) begin @(posedge clk); #1; end
  endtask

  logic [31:0] d;
  li ra, rb;
  initial begin
    foreach (next_words[c]) next_words[c] = new_word(c);
    repeat (4) @(posedge clk); #1;
    rst = 0;
    // ---- load every table with random contents
    for (int c = 0; c < 33; c++)
      for (int s = 0; s < 2; s++)
        for (int k = 0; k < 256; k++)
          bwrite({DC_REGION, 1'b0, 6'(c), 1'(s), 8'(k)}, 32'(int'($urandom % 262144) - 131072));
    for (int t = 0; t < 10; t++)
      for (int k = 0; k < 2048; k++) begin
        int v;
        case (t)
          TID_G_I, TID_G_Q, TID_KG_I, TID_KG_Q: v = int'($urandom % 8192) - 4096;
          default:                              v = int'($urandom % 40000) - 20000;
        endcase
        bwrite({PT_REGION, 1'b0, 4'(t), 11'(k)}, 32'(v));
      end
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 256; k++)
        bwrite({LIN_REGION, 7'd0, 1'(s), 8'(k)}, 32'(40000 + $urandom % 60000));
    for (int u = 0; u < 4; u++)
      for (int s = 0; s < 2; s++)
        for (int k = 0; k < 256; k++)
          bwrite({UC_REGION, 5'd0, 2'(u), 1'(s), 8'(k)}, 32'(int'($urandom % 262144) - 131072));
    // table read-back through the bus
    for (int n = 0; n < 40; n++) begin
      int c = int'($urandom % 33), k = int'($urandom % 256), t = int'($urandom % 10), j = int'($urandom % 2048);
      bread({DC_REGION, 1'b0, 6'(c), 1'b1, 8'(k)}, d);
      checks++; if (sx(li'(d), 32) != t_dc[c][1][k]) begin failures++; $display("dc table read"); end
      bread({PT_REGION, 1'b0, 4'(t), 11'(j)}, d);
      checks++; if (sx(li'(d), 32) != t_pt[t][j]) begin failures++; $display("pulse table read"); end
      n_tbl_rd += 2;
    end
    // ---- reset the data path: tables keep their contents, the model starts in step
    repeat (3) @(posedge clk);
    rst = 1;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (2) @(posedge clk); #1;
    check_on = 1;

    // ---- phase A: all terms on, fast pulse stepping
    bwrite({REG_REGION, 12'd0, R_DC_LEN}, 32'd100);     // 101-sample IF pattern
    bwrite({REG_REGION, 12'd0, R_UC_LEN}, 32'd100);
    bwrite({REG_REGION, 12'd0, R_TBL_DIV}, 32'd0);
    bwrite({REG_REGION, 12'd0, R_ACQ_DIV}, 32'd0);
    bwrite({REG_REGION, 12'd0, R_DIAG_CH}, 32'd32);
    bwrite({REG_REGION, 12'd0, R_LPF_K}, 32'd3);
    bwrite({REG_REGION, 12'd0, R_CTRL}, 32'b111);
    wait_samples(20);
    start_trig = 1; wait_samples(3); start_trig = 0;
    wait_samples(2100);
    bread({REG_REGION, 12'd0, R_STATUS}, d);
    checks++; if (d[2:0] != 3'b010) begin failures++; $display("status %b after phase A", d[2:0]); end
    // a few buffer words of this acquisition (every sample was stored)
    for (int n = 0; n < 50; n++) begin
      int b = int'($urandom % 11), j = int'($urandom % 2048);
      bread({BUF_REGION, 1'b0, 4'(b), 11'(j)}, d);
      checks++; if (sx(li'(d), 18) != buf_m[b][j]) begin failures++; $display("A buf %0d[%0d] %0d exp %0d", b, j, sx(li'(d), 18), buf_m[b][j]); end
      n_buf_rd++;
    end

    // ---- phase B: group delay with unity tables at the held pulse index 2047
    bwrite({REG_REGION, 12'd0, R_CTRL}, 32'b001);
    for (int c = 0; c < 24; c++)
      for (int k = 0; k < 256; k++) begin
        bwrite({DC_REGION, 1'b0, 6'(c), 1'b0, 8'(k)}, 32'd4096);
        bwrite({DC_REGION, 1'b0, 6'(c), 1'b1, 8'(k)}, 32'd0);
      end
    bwrite({PT_REGION, 1'b0, 4'(TID_SP_I), 11'd2047}, 32'd0);
    bwrite({PT_REGION, 1'b0, 4'(TID_SP_Q), 11'd2047}, 32'd0);
    bwrite({PT_REGION, 1'b0, 4'(TID_G_I), 11'd2047}, 32'd4096);
    bwrite({PT_REGION, 1'b0, 4'(TID_G_Q), 11'd2047}, 32'd4096);
    for (int k = 0; k < 256; k++) bwrite({LIN_REGION, 7'd0, 1'b0, 8'(k)}, 32'd65536);
    for (int k = 0; k < 256; k++) begin
      bwrite({UC_REGION, 5'd0, 2'd0, 1'b0, 8'(k)}, 32'd65536);
      bwrite({UC_REGION, 5'd0, 2'd0, 1'b1, 8'(k)}, 32'd0);
    end
    cavity_level = 0;
    wait_samples(40);
    // the step enters with the next frame to be sent; arm the counter when it reaches the data path
    gd_arm = 1;
    cavity_level = 1000;
    wait_samples(20);
    checks++; if (gd_start >= 0 || gd_arm) begin failures++; $display("DAC never answered the step"); end
    cavity_level = -1;

    // ---- phase C: one full pulse and acquisition at the default rates
    bwrite({REG_REGION, 12'd0, R_TBL_DIV}, 32'd64);
    bwrite({REG_REGION, 12'd0, R_ACQ_DIV}, 32'd64);
    bwrite({REG_REGION, 12'd0, R_DIAG_CH}, 32'd5);
    bwrite({REG_REGION, 12'd0, R_CTRL}, 32'b111);
    wait_samples(10);
    start_trig = 1; wait_samples(2);
    bread({REG_REGION, 12'd0, R_STATUS}, d);
    checks++; if (d[2:0] != 3'b101) begin failures++; $display("status %b during pulse", d[2:0]); end
    start_trig = 0;
    while (!acq_done || pt_act) wait_samples(1000);
    wait_samples(70);
    bread({REG_REGION, 12'd0, R_STATUS}, d);
    checks++; if (d[2:0] != 3'b010) begin failures++; $display("status %b after pulse", d[2:0]); end
    for (int b = 0; b < 11; b++)
      for (int j = 0; j < 2048; j++) begin
        bread({BUF_REGION, 1'b0, 4'(b), 11'(j)}, d);
        checks++; if (sx(li'(d), 18) != buf_m[b][j]) begin
          failures++; if (failures < 40) $display("C buf %0d[%0d] %0d exp %0d", b, j, sx(li'(d), 18), buf_m[b][j]);
        end
        n_buf_rd++;
      end

    $display("samples=%0d triggers=%0d pulse_steps=%0d pulse_ends=%0d acq_writes=%0d acq_done=%0d",
             n_samples, n_trig, n_step, n_pulse_end, n_acq_wr, n_acq_done);
    $display("linearizer_index=%0d feedback=%0d feedforward=%0d klystron=%0d buffer_reads=%0d table_reads=%0d group_delay=%0d dac_saturated=%0d",
             n_lin, n_fb, n_ff, n_kly, n_buf_rd, n_tbl_rd, n_gd, n_dac_sat);
    begin
      automatic int cnt [13] = '{n_samples, n_trig, n_step, n_pulse_end, n_acq_wr, n_acq_done, n_lin, n_fb, n_ff, n_kly, n_buf_rd, n_tbl_rd, n_gd};
      for (int i = 0; i < 13; i++) begin
        checks++; if (cnt[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
