// func_regs: the function registers. They hold the words that the DDS data
// generators put on the DDS port: the FTWs of each mode, the chirp step and
// ramp-rate words, the mode and the TDM and FM settings. The decoder writes one
// register at a time through an indexed 32-bit port (narrower fields take the
// low bits); all of them are read at once as one struct. Writes take effect at
// the next clock. The document gives the registers' role and 32-bit width;
// the register map and reset values (all zero, FF mode, four TDM frequencies)
// are this design's.
module func_regs import ddfs_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  fr_idx_e     idx,
  input  logic [31:0] wdata,
  output func_regs_t  regs
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs          <= '0;
      regs.mode     <= MODE_FF;
      regs.tdm_last <= 2'd3;
    end else if (we) begin
      case (idx)
        FR_FTW_FF:   regs.ftw_ff      <= wdata;
        FR_FTW_FM:   regs.ftw_fm_base <= wdata;
        FR_FTW_TDM0: regs.ftw_tdm[0]  <= wdata;
        FR_FTW_TDM1: regs.ftw_tdm[1]  <= wdata;
        FR_FTW_TDM2: regs.ftw_tdm[2]  <= wdata;
        FR_FTW_TDM3: regs.ftw_tdm[3]  <= wdata;
        FR_FTW_CRP:  regs.ftw_crp     <= wdata;
        FR_DFTW:     regs.dftw        <= wdata;
        FR_RRW:      regs.rrw         <= wdata[15:0];
        FR_MODE: begin
          regs.mode     <= mode_e'(wdata[1:0]);
          regs.tdm_last <= wdata[3:2];
        end
        FR_DEV:      regs.dev_sel     <= wdata[1:0];
        default: ;
      endcase
    end
  end
endmodule
