// tb_host_if: checks reset values and write/read-back of the control
// registers, the status register, the soft trigger pulse, the broadcast of
// requests, and that table read data (modelled here as a function of the
// address, returned the cycle after the request) comes back on bus_rdata
// with bus_rvalid exactly three cycles after bus_rd_en.
module tb_host_if;
  import mfc_pkg::*;
  logic clk = 0, rst = 1;
  logic [19:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata, rd_or;
  logic bus_wr_en = 0, bus_rd_en = 0, bus_rvalid, soft_trig;
  logic [2:0] status = 3'b101;
  host_req_t host_req;
  cfg_t cfg;
  int checks = 0, failures = 0, ntrig = 0;

  host_if dut (.clk, .rst, .bus_addr, .bus_wdata, .bus_wr_en, .bus_rd_en, .bus_rdata, .bus_rvalid,
               .host_req, .rd_or, .status, .cfg, .soft_trig);
  always #5 clk = ~clk;
  always @(posedge clk) if (soft_trig && !rst) ntrig++;

  // a model table: answers any non-register address with a value derived from it
  logic [31:0] tbl_q;
  always @(posedge clk)
    tbl_q <= (host_req.re && host_req.addr[19:16] != REG_REGION) ? {12'hA5A, host_req.addr} : 32'h0;
  assign rd_or = tbl_q;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bwrite(input logic [19:0] a, input logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_wr_en = 1;
    @(posedge clk); #1;
    bus_wr_en = 0;
  endtask
  task automatic bread(input logic [19:0] a, output logic [31:0] d);
    int lat;
    bus_addr = a; bus_rd_en = 1;
    @(posedge clk); #1;
    bus_rd_en = 0;
    lat = 1;
    while (!bus_rvalid && lat < 10) begin @(posedge clk); #1; lat++; end
    checks++; if (lat != 3) begin failures++; $display("read latency %0d", lat); end
    d = bus_rdata;
  endtask

  logic [31:0] d;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (cfg.dc_len_m1 != 255 || cfg.uc_len_m1 != 255 || cfg.tbl_div != 64 || cfg.acq_div != 64 ||
        cfg.fb_en || cfg.ff_en || cfg.kly_en || cfg.lpf_k != 4) begin failures++; $display("reset values"); end
    bwrite(20'(R_DC_LEN), 32'd100);
    bwrite(20'(R_UC_LEN), 32'd50);
    bwrite(20'(R_TBL_DIV), 32'd7);
    bwrite(20'(R_ACQ_DIV), 32'd9);
    bwrite(20'(R_DIAG_CH), 32'd32);
    bwrite(20'(R_LPF_K), 32'd2);
    bwrite(20'(R_CTRL), 32'b0111);
    @(posedge clk); #1;   // registers update one cycle after the request register
    checks++;
    if (cfg.dc_len_m1 != 100 || cfg.uc_len_m1 != 50 || cfg.tbl_div != 7 || cfg.acq_div != 9 ||
        cfg.diag_ch != 32 || cfg.lpf_k != 2 || !cfg.fb_en || !cfg.ff_en || !cfg.kly_en) begin failures++; $display("cfg after write"); end
    checks++; if (ntrig != 0) begin failures++; $display("unexpected trigger"); end
    bwrite(20'(R_CTRL), 32'b1001);
    repeat (2) @(posedge clk); #1;
    checks++; if (ntrig != 1 || cfg.ff_en) begin failures++; $display("soft trigger %0d", ntrig); end
    bread(20'(R_DC_LEN), d);  checks++; if (d != 100) begin failures++; $display("rd dc_len %0d", d); end
    bread(20'(R_DIAG_CH), d); checks++; if (d != 32) begin failures++; $display("rd diag %0d", d); end
    bread(20'(R_CTRL), d);    checks++; if (d != 1) begin failures++; $display("rd ctrl %0d", d); end
    bread(20'(R_STATUS), d);  checks++; if (d != 5) begin failures++; $display("rd status %0d", d); end
    // broadcast of a table write
    bus_addr = 20'h2_0812; bus_wdata = 32'hDEAD; bus_wr_en = 1;
    @(posedge clk); #1; bus_wr_en = 0;
    checks++; if (!host_req.we || host_req.addr != 20'h2_0812 || host_req.wdata != 32'hDEAD) begin failures++; $display("broadcast"); end
    for (int n = 0; n < 20; n++) begin
      logic [19:0] a;
      a = {4'(1 + $urandom % 5), 16'($urandom)};
      bread(a, d);
      checks++; if (d != {12'hA5A, a}) begin failures++; $display("table read %h got %h", a, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
