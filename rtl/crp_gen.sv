// crp_gen: write list for the chirp mode, in the order of the document's chirp
// flow chart: four control register bytes (sweep enabled, frequency accumulator
// cleared on every FUD), four start-FTW bytes, four step-word (DFTW) bytes and
// the two ramp-rate-word bytes, then a FUD. Multi-byte words go least
// significant byte first. Purely combinational.
module crp_gen import ddfs_pkg::*; (
  input  logic [STEP_W-1:0] step,
  input  logic [31:0]       ftw_start,
  input  logic [31:0]       dftw,
  input  logic [15:0]       rrw,
  output dds_wr_t           wr
);
  always_comb begin
    wr = '0;
    unique case (step[3:2])
      2'd0: begin
        wr.addr = ADDR_CFR + DDS_AW'(step[1:0]);
        wr.data = CFR_CHIRP[8*step[1:0] +: 8];
      end
      2'd1: begin
        wr.addr = ADDR_FTW0 + DDS_AW'(step[1:0]);
        wr.data = ftw_start[8*step[1:0] +: 8];
      end
      2'd2: begin
        wr.addr = ADDR_DFTW + DDS_AW'(step[1:0]);
        wr.data = dftw[8*step[1:0] +: 8];
      end
      default: begin
        wr.addr = ADDR_DFRRW + DDS_AW'(step[0]);
        wr.data = rrw[8*step[0] +: 8];
      end
    endcase
    wr.fud_after = (step >= 13);
    wr.last      = (step >= 13);
  end
endmodule
