// ddfs_pkg: types and constants shared by the DDS controller.
//
// The controller drives an external direct digital synthesizer (DDS) chip of the
// AD9858 kind: a 1 GHz sample clock, a 32-bit frequency tuning word (FTW) and an
// 8-bit parallel register port. The output frequency is
//   f_out = FTW * f_clk / 2^32,
// so one FTW step is 1e9 / 2^32 = 0.233 Hz.
//
// Frequencies arrive from the host as eight packed BCD digits in units of 10 Hz
// (BCD 10000000 = 100 MHz, FTW 0x19999999). The register addresses below are the
// byte addresses of the AD9858 parallel port (control register bytes 0x00-0x03,
// delta-FTW 0x04-0x07, ramp-rate word 0x08-0x09, profile FTWs at 0x0A, 0x10,
// 0x16 and 0x1C). Only addresses below 0x20 are written, which is why a 5-bit
// address with the 8-bit data makes up the 13-bit function data bus.
//
// The FM deviations (8, 15, 30, 100 kHz), the 14-bit ADC and the 500 kHz ADC
// rate are the specification's. The descriptor code map, the control register
// words and the deviation/mode encodings are this design's own choices.
package ddfs_pkg;

  // ---------------------------------------------------------------- clocks
  localparam longint unsigned DDS_CLK_HZ  = 64'd1_000_000_000; // DDS system clock
  localparam longint unsigned FPGA_CLK_HZ = 64'd50_000_000;    // controller clock
  localparam longint unsigned FREQ_UNIT_HZ = 64'd10;           // weight of the BCD LSB
  localparam int unsigned     DDS_SYNC_DIV = 8;                // DDS ramp clock = f_clk / 8
  localparam int unsigned     ADC_RATE_HZ  = 500_000;          // FM sample rate

  // ----------------------------------------------------------- DDS addresses
  localparam int unsigned DDS_AW = 5;
  localparam logic [DDS_AW-1:0] ADDR_CFR   = 5'h00; // 4 bytes, LS byte first
  localparam logic [DDS_AW-1:0] ADDR_DFTW  = 5'h04; // 4 bytes
  localparam logic [DDS_AW-1:0] ADDR_DFRRW = 5'h08; // 2 bytes
  localparam logic [DDS_AW-1:0] ADDR_FTW0  = 5'h0A; // profile 0 FTW, 4 bytes
  localparam logic [DDS_AW-1:0] ADDR_FTW1  = 5'h10;
  localparam logic [DDS_AW-1:0] ADDR_FTW2  = 5'h16;
  localparam logic [DDS_AW-1:0] ADDR_FTW3  = 5'h1C;

  function automatic logic [DDS_AW-1:0] profile_ftw_addr(input logic [1:0] p);
    case (p)
      2'd0: return ADDR_FTW0;
      2'd1: return ADDR_FTW1;
      2'd2: return ADDR_FTW2;
      default: return ADDR_FTW3;
    endcase
  endfunction

  // Control register words written at the start of every mode. Single tone for
  // FF, FM and TDM; the chirp word adds the frequency-sweep enable and the
  // auto-clear of the frequency accumulator, so that every FUD restarts the
  // sweep at the start frequency. Check the bit positions against the DDS
  // datasheet before use.
  localparam int unsigned CFR_SWEEP_EN_BIT   = 21;
  localparam int unsigned CFR_AUTOCLR_FA_BIT = 19;
  localparam logic [31:0] CFR_SINGLE_TONE = 32'h0000_0000;
  localparam logic [31:0] CFR_CHIRP = CFR_SINGLE_TONE | (32'd1 << CFR_SWEEP_EN_BIT)
                                                      | (32'd1 << CFR_AUTOCLR_FA_BIT);

  // ------------------------------------------------------------------ modes
  typedef enum logic [1:0] {MODE_FF = 2'd0, MODE_FM = 2'd1, MODE_TDM = 2'd2, MODE_CHIRP = 2'd3} mode_e;

  // FM peak-to-peak deviation selected by a 2-bit code
  localparam int unsigned N_DEV = 4;
  function automatic longint unsigned dev_hz(input int unsigned sel);
    case (sel)
      0: return 64'd8_000;
      1: return 64'd15_000;
      2: return 64'd30_000;
      default: return 64'd100_000;
    endcase
  endfunction

  // Frequency offset, as FTW, of the ADC code value 'code' for deviation 'sel':
  // round(code * (dev / 2^14) * (2^32 / f_clk)).
  function automatic logic [31:0] dev_ftw(input int unsigned sel, input longint unsigned code);
    longint unsigned num;
    num = code * dev_hz(sel) * 64'd262144;          // 2^32 / 2^14 = 2^18
    return 32'((num + DDS_CLK_HZ / 2) / DDS_CLK_HZ);
  endfunction

  // ------------------------------------------------------ function registers
  typedef struct packed {
    logic [31:0]       ftw_ff;       // fixed frequency
    logic [31:0]       ftw_fm_base;  // FM centre FTW minus half the deviation
    logic [3:0][31:0]  ftw_tdm;      // the four TDM frequencies
    logic [31:0]       ftw_crp;      // chirp start FTW
    logic [31:0]       dftw;         // chirp step FTW
    logic [15:0]       rrw;          // chirp ramp-rate word
    mode_e             mode;
    logic [1:0]        tdm_last;     // number of TDM frequencies minus one
    logic [1:0]        dev_sel;      // FM deviation code
  } func_regs_t;

  typedef enum logic [3:0] {
    FR_FTW_FF = 4'd0, FR_FTW_FM = 4'd1, FR_FTW_TDM0 = 4'd2, FR_FTW_TDM1 = 4'd3,
    FR_FTW_TDM2 = 4'd4, FR_FTW_TDM3 = 4'd5, FR_FTW_CRP = 4'd6, FR_DFTW = 4'd7,
    FR_RRW = 4'd8, FR_MODE = 4'd9, FR_DEV = 4'd10
  } fr_idx_e;

  typedef enum logic [1:0] {TMR_TDM = 2'd0, TMR_CRP = 2'd1, TMR_ADC = 2'd2} tmr_sel_e;

  // -------------------------------------------------------- descriptor codes
  // desc[7:4] names the quantity, desc[1:0] the byte (least significant first).
  typedef enum logic [3:0] {
    D_FF_FREQ = 4'h0, D_FM_FREQ = 4'h1, D_TDM_F0 = 4'h2, D_TDM_F1 = 4'h3,
    D_TDM_F2 = 4'h4, D_TDM_F3 = 4'h5, D_CRP_START = 4'h6, D_CRP_STOP = 4'h7,
    D_CRP_STEP = 4'h8, D_CRP_RRW = 4'h9, D_FM_DEV = 4'hA, D_MODE = 4'hB,
    D_TDM_TIME = 4'hC, D_ADC_TIME = 4'hD
  } desc_e;

  // -------------------------------------------------- DDS write-list entries
  localparam int unsigned STEP_W = 5;
  typedef struct packed {
    logic [DDS_AW-1:0] addr;
    logic [7:0]        data;
    logic              fud_after;  // pulse FUD after this write
    logic              last;       // last write of the list
  } dds_wr_t;

  // The DDS command lines: 13 function-data lines and 7 control lines.
  typedef struct packed {
    logic [DDS_AW-1:0] addr;
    logic [7:0]        data;
  } dds_bus_t;

  typedef struct packed {
    logic       rf_sw;     // RF output switch, 1 = on
    logic       reset;     // DDS master reset, active high
    logic [1:0] ps;        // profile select
    logic       fud;       // frequency update, active high
    logic       rd_n;      // read strobe, held inactive
    logic       wr_n;      // write strobe
  } dds_ctrl_t;

endpackage
