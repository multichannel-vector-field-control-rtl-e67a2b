// host_if: host/DSP bus interface of the MFC FPGA.
//
// The DSP and the crate CPU (through the VXI interface chip) reach every
// table and diagnostic buffer through this block. A bus access is a
// one-cycle strobe (bus_wr_en or bus_rd_en) with a word address and, for
// writes, data. The access is registered and broadcast to all tables as
// host_req; each table decodes its own address (see mfc_pkg for the map) and
// returns its read data, zero when not addressed, so the block receives the
// OR of all of them (rd_or). Read data is returned on bus_rdata with
// bus_rvalid three cycles after bus_rd_en (request register, RAM read,
// output register). Region 0 holds the control registers (cfg) and a status
// register; writing bit 3 of R_CTRL gives a one-cycle soft trigger. The
// document says only that tables and buffers can be written and read by the
// DSP or CPU; protocol, latency, address map and registers are this design's
// choices.
module host_if
  import mfc_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic [HAW-1:0] bus_addr,
  input  logic [HDW-1:0] bus_wdata,
  input  logic           bus_wr_en,
  input  logic           bus_rd_en,
  output logic [HDW-1:0] bus_rdata,
  output logic           bus_rvalid,
  output host_req_t      host_req,
  input  logic [HDW-1:0] rd_or,
  input  logic [2:0]     status,
  output cfg_t           cfg,
  output logic           soft_trig
);
  logic           rd1_q;      // a read is in the table stage
  logic [HDW-1:0] reg_rdata_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      host_req <= '0;
    end else begin
      host_req.we    <= bus_wr_en;
      host_req.re    <= bus_rd_en && !bus_wr_en;
      host_req.addr  <= bus_addr;
      host_req.wdata <= bus_wdata;
    end
  end

  logic reg_hit;
  assign reg_hit = region(host_req.addr) == REG_REGION;

  always_ff @(posedge clk) begin
    soft_trig <= 1'b0;
    if (rst) begin
      cfg.fb_en     <= 1'b0;
      cfg.ff_en     <= 1'b0;
      cfg.kly_en    <= 1'b0;
      cfg.dc_len_m1 <= 8'd255;
      cfg.uc_len_m1 <= 8'd255;
      cfg.tbl_div   <= 8'd64;
      cfg.acq_div   <= 8'd64;
      cfg.diag_ch   <= '0;
      cfg.lpf_k     <= 4'd4;
    end else if (host_req.we && reg_hit) begin
      unique case (host_req.addr[3:0])
        R_CTRL: begin
          cfg.fb_en  <= host_req.wdata[0];
          cfg.ff_en  <= host_req.wdata[1];
          cfg.kly_en <= host_req.wdata[2];
          soft_trig  <= host_req.wdata[3];
        end
        R_DC_LEN:  cfg.dc_len_m1 <= host_req.wdata[7:0];
        R_UC_LEN:  cfg.uc_len_m1 <= host_req.wdata[7:0];
        R_TBL_DIV: cfg.tbl_div   <= host_req.wdata[7:0];
        R_ACQ_DIV: cfg.acq_div   <= host_req.wdata[7:0];
        R_DIAG_CH: cfg.diag_ch   <= host_req.wdata[5:0];
        R_LPF_K:   cfg.lpf_k     <= host_req.wdata[3:0];
        default: ;
      endcase
    end
  end

  logic [HDW-1:0] reg_val;
  always_comb begin
    unique case (host_req.addr[3:0])
      R_CTRL:    reg_val = HDW'({cfg.kly_en, cfg.ff_en, cfg.fb_en});
      R_DC_LEN:  reg_val = HDW'(cfg.dc_len_m1);
      R_UC_LEN:  reg_val = HDW'(cfg.uc_len_m1);
      R_TBL_DIV: reg_val = HDW'(cfg.tbl_div);
      R_ACQ_DIV: reg_val = HDW'(cfg.acq_div);
      R_DIAG_CH: reg_val = HDW'(cfg.diag_ch);
      R_LPF_K:   reg_val = HDW'(cfg.lpf_k);
      R_STATUS:  reg_val = HDW'(status);
      default:   reg_val = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd1_q       <= 1'b0;
      reg_rdata_q <= '0;
      bus_rvalid  <= 1'b0;
      bus_rdata   <= '0;
    end else begin
      rd1_q       <= host_req.re;
      reg_rdata_q <= (host_req.re && reg_hit) ? reg_val : '0;
      bus_rvalid  <= rd1_q;
      bus_rdata   <= rd1_q ? (rd_or | reg_rdata_q) : '0;
    end
  end

  // a read and a write in the same cycle are not allowed
  assert property (@(posedge clk) disable iff (rst) !(bus_wr_en && bus_rd_en));
endmodule
