// mfc_pkg: types, constants and helper functions shared by the multichannel
// field control (MFC) FPGA signal processing modules.
//
// The host bus is a word-addressed bus with a 20-bit address. The upper four
// address bits select a region; the rest selects a word inside it:
//   region 0  control registers          addr[3:0] register number
//   region 1  down-converter tables      addr[14:9] channel (0..32), addr[8] 0=cos 1=sin, addr[7:0] index
//   region 2  pulse tables               addr[14:11] table id (TID_*), addr[10:0] index
//   region 3  linearizer tables          addr[8] 0=cavity loop 1=klystron loop, addr[7:0] index
//   region 4  up-converter tables        addr[10:9] up-converter, addr[8] 0=A 1=B, addr[7:0] index
//   region 5  diagnostic buffers (read)  addr[14:11] buffer id (BUF_*), addr[10:0] index
// The document says only that the tables and buffers are reachable from the
// DSP and the crate CPU; this map, the register set and the number formats
// below are this design's choices.
package mfc_pkg;

  localparam int unsigned HAW = 20;   // host word address width
  localparam int unsigned HDW = 32;   // host data width

  localparam logic [3:0] REG_REGION = 4'd0;
  localparam logic [3:0] DC_REGION  = 4'd1;
  localparam logic [3:0] PT_REGION  = 4'd2;
  localparam logic [3:0] LIN_REGION = 4'd3;
  localparam logic [3:0] UC_REGION  = 4'd4;
  localparam logic [3:0] BUF_REGION = 4'd5;

  // pulse table ids (region 2)
  localparam int unsigned TID_SP_I = 0;
  localparam int unsigned TID_SP_Q = 1;
  localparam int unsigned TID_G_I = 2;
  localparam int unsigned TID_G_Q = 3;
  localparam int unsigned TID_FF_I = 4;
  localparam int unsigned TID_FF_Q = 5;
  localparam int unsigned TID_KSP_I = 6;
  localparam int unsigned TID_KSP_Q = 7;
  localparam int unsigned TID_KG_I = 8;
  localparam int unsigned TID_KG_Q = 9;

  // diagnostic buffer ids (region 5)
  localparam int unsigned BUF_ADC = 0;
  localparam int unsigned BUF_IX = 1;
  localparam int unsigned BUF_QX = 2;
  localparam int unsigned BUF_IVEC = 3;
  localparam int unsigned BUF_QVEC = 4;
  localparam int unsigned BUF_IERR = 5;
  localparam int unsigned BUF_QERR = 6;
  localparam int unsigned BUF_IEG = 7;
  localparam int unsigned BUF_QEG = 8;
  localparam int unsigned BUF_IOUT = 9;
  localparam int unsigned BUF_QOUT = 10;

  // control registers (region 0)
  localparam logic [3:0] R_CTRL    = 4'd0;  // [0] feedback en, [1] feedforward en, [2] klystron loop en, [3] soft trigger (self clearing)
  localparam logic [3:0] R_DC_LEN  = 4'd1;  // down-converter table length - 1
  localparam logic [3:0] R_UC_LEN  = 4'd2;  // up-converter table length - 1
  localparam logic [3:0] R_TBL_DIV = 4'd3;  // sample cycles per pulse table step - 1
  localparam logic [3:0] R_ACQ_DIV = 4'd4;  // sample cycles per acquisition - 1
  localparam logic [3:0] R_DIAG_CH = 4'd5;  // channel shown in the ADC / Ix / Qx buffers
  localparam logic [3:0] R_LPF_K   = 4'd6;  // klystron loop low-pass shift
  localparam logic [3:0] R_STATUS  = 4'd7;  // read only: [0] acq busy, [1] acq done, [2] pulse active

  typedef struct packed {
    logic             we;
    logic             re;
    logic [HAW-1:0]   addr;
    logic [HDW-1:0]   wdata;
  } host_req_t;

  typedef struct packed {
    logic       fb_en;
    logic       ff_en;
    logic       kly_en;
    logic [7:0] dc_len_m1;
    logic [7:0] uc_len_m1;
    logic [7:0] tbl_div;
    logic [7:0] acq_div;
    logic [5:0] diag_ch;
    logic [3:0] lpf_k;
  } cfg_t;

  function automatic logic [3:0] region(input logic [HAW-1:0] a);
    return a[HAW-1 -: 4];
  endfunction

endpackage
