// func_data_decoder: the function data decoder. It takes one descriptor/data
// byte pair per command and turns the commands into function register and timer
// register writes.
//
// The descriptor's high nibble names the quantity, its two low bits the byte
// (least significant first):
//   0 FF frequency  1 FM centre  2-5 TDM frequency 0-3  6 chirp start
//   7 chirp stop    8 chirp step (all 8 packed BCD digits, 10 Hz units, byte 3 last)
//   9 ramp-rate word (2 bytes)   A FM deviation code (0-3: 8/15/30/100 kHz)
//   B mode: bits 1:0 mode (FF, FM, TDM, chirp), bits 3:2 TDM frequencies - 1
//   C TDM dwell time, D ADC period (4 bytes, binary, controller clocks)
// Frequency bytes collect in the frequency accumulator; the fourth byte
// starts the BCD-to-FTW conversion. For the FM centre the stored word is the
// centre FTW minus half the deviation (the FTW - dF unit), so that mid-scale ADC
// data gives the centre frequency. Chirp start, stop, step and ramp-rate
// commands rerun the ramp-rate computation, whose result loads the chirp timer.
// The sub-blocks (descriptor and data buffers, deviation register, frequency
// and ramp-rate accumulators, BCD-to-FTW, FTW - dF, ramp-rate computation)
// are the document's; the descriptor codes are this design's, except that
// descriptors 00-03 load bytes 0-3 of the frequency accumulator as in the
// document's simulation.
//
// Timing: 'busy' rises with 'go'; a frequency command ends 4 clocks later, a
// chirp command about 72 clocks later.
module func_data_decoder import ddfs_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        latch,
  input  logic        go,
  input  logic [7:0]  desc_in,
  input  logic [7:0]  byte_in,
  output logic        busy,
  output logic        fr_we,
  output fr_idx_e     fr_idx,
  output logic [31:0] fr_wdata,
  output logic        tmr_we,
  output tmr_sel_e    tmr_sel,
  output logic [31:0] tmr_wdata,
  output logic [31:0] freq_acc,
  output logic [31:0] ftw_out
);
  typedef enum logic [2:0] {D_IDLE, D_CONV_GO, D_CONV, D_FMBASE, D_RAMP_GO, D_RAMP} dstate_e;

  function automatic logic [31:0] half_dev(input int unsigned d);
    return dev_ftw(d, 64'd8192);
  endfunction
  localparam logic [31:0] HALF_DEV [N_DEV] = '{half_dev(0), half_dev(1), half_dev(2), half_dev(3)};

  dstate_e     state;
  logic [7:0]  desc_q, byte_q;          // data descriptor buffer, function data buffer
  desc_e       func;
  logic [1:0]  bsel;
  logic [7:0]  dev_q;                   // FM deviation data register
  logic [15:0] rr_acc;                  // ramp rate accumulator
  logic [31:0] word_acc;                // timer word accumulator
  logic [31:0] ftw_center, crp_start, crp_stop, crp_step;
  logic [15:0] crp_rrw;
  logic        conv_start, conv_valid, ramp_start, ramp_valid, ramp_busy;
  logic [31:0] conv_ftw, ramp_period;

  assign func = desc_e'(desc_q[7:4]);
  assign bsel = desc_q[1:0];

  bcd_to_ftw u_bcd (.clk, .rst_n, .start(conv_start), .bcd(freq_acc),
                    .valid(conv_valid), .ftw(conv_ftw));

  ramp_rate_calc u_ramp (.clk, .rst_n, .start(ramp_start), .ftw_start(crp_start),
                         .ftw_stop(crp_stop), .dftw(crp_step), .rrw(crp_rrw),
                         .busy(ramp_busy), .valid(ramp_valid), .period(ramp_period));

  assign conv_start = (state == D_CONV_GO);
  assign ramp_start = (state == D_RAMP_GO);
  assign busy       = (state != D_IDLE) || go;
  assign ftw_out    = conv_ftw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= D_IDLE;
      desc_q     <= '0;
      byte_q     <= '0;
      dev_q      <= '0;
      rr_acc     <= '0;
      word_acc   <= '0;
      freq_acc   <= '0;
      ftw_center <= '0;
      crp_start  <= '0;
      crp_stop   <= '0;
      crp_step   <= '0;
      crp_rrw    <= '0;
      fr_we      <= 1'b0;
      fr_idx     <= FR_FTW_FF;
      fr_wdata   <= '0;
      tmr_we     <= 1'b0;
      tmr_sel    <= TMR_TDM;
      tmr_wdata  <= '0;
    end else begin
      fr_we  <= 1'b0;
      tmr_we <= 1'b0;
      if (latch) begin
        desc_q <= desc_in;
        byte_q <= byte_in;
      end
      unique case (state)
        D_IDLE: if (go) begin
          unique case (func)
            D_FF_FREQ, D_FM_FREQ, D_TDM_F0, D_TDM_F1, D_TDM_F2, D_TDM_F3,
            D_CRP_START, D_CRP_STOP, D_CRP_STEP: begin
              freq_acc[8*bsel +: 8] <= byte_q;
              if (bsel == 2'd3) state <= D_CONV_GO;
            end
            D_CRP_RRW: begin
              rr_acc[8*bsel[0] +: 8] <= byte_q;
              if (bsel[0]) begin
                crp_rrw  <= {byte_q, rr_acc[7:0]};
                fr_we    <= 1'b1;
                fr_idx   <= FR_RRW;
                fr_wdata <= {16'd0, byte_q, rr_acc[7:0]};
                state    <= D_RAMP_GO;
              end
            end
            D_FM_DEV: begin
              dev_q    <= byte_q;
              fr_we    <= 1'b1;
              fr_idx   <= FR_DEV;
              fr_wdata <= {24'd0, byte_q};
              state    <= D_FMBASE;
            end
            D_MODE: begin
              fr_we    <= 1'b1;
              fr_idx   <= FR_MODE;
              fr_wdata <= {24'd0, byte_q};
            end
            D_TDM_TIME, D_ADC_TIME: begin
              word_acc[8*bsel +: 8] <= byte_q;
              if (bsel == 2'd3) begin
                tmr_we    <= 1'b1;
                tmr_sel   <= (func == D_TDM_TIME) ? TMR_TDM : TMR_ADC;
                tmr_wdata <= {byte_q, word_acc[23:0]};
              end
            end
            default: ;
          endcase
        end
        D_CONV_GO: state <= D_CONV;
        D_CONV: if (conv_valid) begin
          state <= D_IDLE;
          unique case (func)
            D_FF_FREQ:  begin fr_we <= 1'b1; fr_idx <= FR_FTW_FF;   fr_wdata <= conv_ftw; end
            D_TDM_F0:   begin fr_we <= 1'b1; fr_idx <= FR_FTW_TDM0; fr_wdata <= conv_ftw; end
            D_TDM_F1:   begin fr_we <= 1'b1; fr_idx <= FR_FTW_TDM1; fr_wdata <= conv_ftw; end
            D_TDM_F2:   begin fr_we <= 1'b1; fr_idx <= FR_FTW_TDM2; fr_wdata <= conv_ftw; end
            D_TDM_F3:   begin fr_we <= 1'b1; fr_idx <= FR_FTW_TDM3; fr_wdata <= conv_ftw; end
            D_FM_FREQ: begin
              ftw_center <= conv_ftw;
              state      <= D_FMBASE;
            end
            D_CRP_START: begin
              crp_start <= conv_ftw;
              fr_we <= 1'b1; fr_idx <= FR_FTW_CRP; fr_wdata <= conv_ftw;
              state <= D_RAMP_GO;
            end
            D_CRP_STOP: begin
              crp_stop <= conv_ftw;
              state    <= D_RAMP_GO;
            end
            default: begin  // D_CRP_STEP
              crp_step <= conv_ftw;
              fr_we <= 1'b1; fr_idx <= FR_DFTW; fr_wdata <= conv_ftw;
              state <= D_RAMP_GO;
            end
          endcase
        end
        D_FMBASE: begin  // FTW - dF
          fr_we    <= 1'b1;
          fr_idx   <= FR_FTW_FM;
          fr_wdata <= ftw_center - HALF_DEV[dev_q[1:0]];
          state    <= D_IDLE;
        end
        D_RAMP_GO: state <= D_RAMP;
        default: if (ramp_valid) begin  // D_RAMP
          tmr_we    <= 1'b1;
          tmr_sel   <= TMR_CRP;
          tmr_wdata <= ramp_period;
          state     <= D_IDLE;
        end
      endcase
    end
  end

  logic unused_rb;
  assign unused_rb = ramp_busy;
endmodule
