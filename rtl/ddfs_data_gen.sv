// ddfs_data_gen: the DDS data generator. It holds the four write-list
// generators (FF_GEN, FF_FM_GEN, TDM_GEN, CRP_GEN), all fed from the function
// registers and driven by the same step number from the output FSM, selects the
// one of the running mode and buffers its address and data in the address and
// data buffers that drive the DDS port. 'load' copies the selected entry into
// the buffers at the next clock; between loads the port holds its value, which
// gives the DDS its setup and hold times around the write strobe. 'cur' returns
// the selected entry's FUD and end-of-list flags to the output FSM. The block
// structure is the document's; the list format is this design's.
module ddfs_data_gen import ddfs_pkg::*; (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  input  func_regs_t        regs,
  input  logic [31:0]       delta_ftw,
  input  logic [STEP_W-1:0] step,
  input  logic              load,
  input  logic              fm_latch,
  output dds_wr_t           cur,
  output dds_bus_t          bus
);
  dds_wr_t     wr_ff, wr_fm, wr_tdm, wr_crp;
  logic [31:0] fm_ftw;

  ff_gen #(.CFR_WORD(CFR_SINGLE_TONE)) u_ff (.step, .ftw(regs.ftw_ff), .wr(wr_ff));

  ff_fm_gen u_fm (.clk, .rst_n, .latch(fm_latch), .base(regs.ftw_fm_base),
                  .delta(delta_ftw), .step, .wr(wr_fm), .ftw_q(fm_ftw));

  tdm_gen u_tdm (.step, .ftw(regs.ftw_tdm), .last(regs.tdm_last), .wr(wr_tdm));

  crp_gen u_crp (.step, .ftw_start(regs.ftw_crp), .dftw(regs.dftw), .rrw(regs.rrw),
                 .wr(wr_crp));

  always_comb begin
    unique case (mode)
      MODE_FF:  cur = wr_ff;
      MODE_FM:  cur = wr_fm;
      MODE_TDM: cur = wr_tdm;
      default:  cur = wr_crp;
    endcase
  end

  // ADDR_BUF and DATA_BUF
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bus <= '0;
    else if (load) bus <= '{addr: cur.addr, data: cur.data};
  end

  logic [31:0] unused_fm_ftw;
  assign unused_fm_ftw = fm_ftw;
endmodule
