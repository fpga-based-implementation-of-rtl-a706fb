// ddfs_controller: FPGA controller of a DDS-based frequency synthesizer.
//
// A host sends commands as descriptor/data byte pairs with a data ready strobe;
// the controller converts BCD frequencies into 32-bit tuning words, keeps them in
// its function registers and, on the start operation strobe, programs an
// external AD9858-class DDS through its 8-bit parallel port (5 address lines,
// 8 data lines) and 7 control lines, in one of four modes:
//   FF    fixed frequency
//   FM    the FTW is recomputed from a 14-bit ADC sample every 2 us (500 kHz
//         convert clock), by split-and-add tables for 8/15/30/100 kHz deviation
//   TDM   up to four frequencies in the DDS profiles, switched by the profile
//         lines every TDM dwell time
//   chirp the DDS sweeps from start to stop frequency in DFTW steps and is
//         restarted every sweep period, which the controller computes
// The blocks and their connections follow the document's functional block
// diagram: input FSM, function data decoder, function registers, timers, ADC
// data conversion, DDS data generator and output FSM. Clock: 50 MHz.
// The DDS read strobe (dds_ctrl.rd_n) is held high: nothing is read back.
module ddfs_controller import ddfs_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  // host side
  input  logic        rf_on,               // RF output on/off
  input  logic        start_strobe,        // start operation strobe
  input  logic        data_ready_strobe,
  input  logic [7:0]  data_desc,
  input  logic [7:0]  data_byte,
  output logic [7:0]  cmd_overruns,        // commands dropped for arriving too early
  // DDS side
  output dds_ctrl_t   dds_ctrl,            // 7 control lines
  output dds_bus_t    dds_bus,             // 13 function data lines
  // ADC side
  output logic        adc_convert,         // 500 kHz ADC convert clock
  input  logic [13:0] adc_data
);
  logic              ifsm_latch, ifsm_go, dec_busy;
  logic              fr_we, tmr_we;
  fr_idx_e           fr_idx;
  tmr_sel_e          tmr_sel;
  logic [31:0]       fr_wdata, tmr_wdata, dec_freq_acc, dec_ftw;
  func_regs_t        regs;
  logic              trg_tdm, trg_crp, trg_fm, en_tdm, en_crp, en_adc;
  logic [31:0]       delta_ftw;
  mode_e             run_mode;
  logic [STEP_W-1:0] step;
  logic              load, fm_latch, ofsm_busy;
  dds_wr_t           cur;

  input_fsm u_ifsm (.clk, .rst_n, .data_ready_strobe, .dec_busy,
                    .latch(ifsm_latch), .go(ifsm_go), .overruns(cmd_overruns));

  func_data_decoder u_dec (.clk, .rst_n, .latch(ifsm_latch), .go(ifsm_go),
                           .desc_in(data_desc), .byte_in(data_byte), .busy(dec_busy),
                           .fr_we, .fr_idx, .fr_wdata, .tmr_we, .tmr_sel, .tmr_wdata,
                           .freq_acc(dec_freq_acc), .ftw_out(dec_ftw));

  func_regs u_regs (.clk, .rst_n, .we(fr_we), .idx(fr_idx), .wdata(fr_wdata), .regs);

  timers u_tmr (.clk, .rst_n, .en_tdm, .en_crp, .en_adc, .we(tmr_we), .sel(tmr_sel),
                .wdata(tmr_wdata), .trg_tdm, .trg_crp, .trg_fm, .conv_adc(adc_convert));

  adc_data_conv u_adc (.clk, .rst_n, .adc_data, .dev_sel(regs.dev_sel), .delta_ftw);

  ddfs_data_gen u_gen (.clk, .rst_n, .mode(run_mode), .regs, .delta_ftw, .step, .load,
                       .fm_latch, .cur, .bus(dds_bus));

  output_fsm u_ofsm (.clk, .rst_n, .start_strobe, .rf_on, .cfg_mode(regs.mode),
                     .cfg_tdm_last(regs.tdm_last), .trg_tdm, .trg_crp, .trg_fm, .cur,
                     .mode_q(run_mode), .step, .load, .fm_latch, .en_tdm, .en_crp, .en_adc,
                     .busy(ofsm_busy), .ctrl(dds_ctrl));

  logic [64:0] unused_dbg;
  assign unused_dbg = {dec_freq_acc, dec_ftw, ofsm_busy};
endmodule
