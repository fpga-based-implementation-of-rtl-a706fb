// timers: the TDM, chirp and ADC timers, each an interval_timer with its own
// 32-bit period register written by the decoder.
//   TDM timer  : trg_tdm every TDM dwell time, switches to the next profile.
//   Chirp timer: trg_crp every sweep period, restarts the chirp.
//   ADC timer  : conv_adc is the ADC convert clock (high for the first half of
//                each period), trg_fm pulses on the last clock of the period,
//                when the converted sample is read and the FTW recomputed.
// The ADC period resets to f_fpga / 500 kHz = 100 clocks, the specification's
// FM sample rate; the other two reset to 0 (stopped) until loaded.
module timers import ddfs_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en_tdm,
  input  logic        en_crp,
  input  logic        en_adc,
  input  logic        we,
  input  tmr_sel_e    sel,
  input  logic [31:0] wdata,
  output logic        trg_tdm,
  output logic        trg_crp,
  output logic        trg_fm,
  output logic        conv_adc
);
  localparam logic [31:0] ADC_PERIOD = 32'(FPGA_CLK_HZ / 64'(ADC_RATE_HZ));

  logic unused_half_tdm, unused_half_crp;
  logic [31:0] unused_p_tdm, unused_p_crp, unused_p_adc;

  interval_timer #(.RESET_PERIOD(32'd0)) u_tdm (
    .clk, .rst_n, .en(en_tdm), .we(we && sel == TMR_TDM), .wdata,
    .trg(trg_tdm), .first_half(unused_half_tdm), .period(unused_p_tdm));

  interval_timer #(.RESET_PERIOD(32'd0)) u_crp (
    .clk, .rst_n, .en(en_crp), .we(we && sel == TMR_CRP), .wdata,
    .trg(trg_crp), .first_half(unused_half_crp), .period(unused_p_crp));

  interval_timer #(.RESET_PERIOD(ADC_PERIOD)) u_adc (
    .clk, .rst_n, .en(en_adc), .we(we && sel == TMR_ADC), .wdata,
    .trg(trg_fm), .first_half(conv_adc), .period(unused_p_adc));
endmodule
