// ff_gen: write list for the fixed-frequency (FF) mode. Given the step number
// from the output FSM it returns the DDS byte write for that step: steps 0-3
// write the four control register bytes, steps 4-7 the four bytes of the
// profile-0 FTW (least significant byte first), and step 7 is followed by a
// frequency update (FUD) and ends the list. The order is the document's FF
// flow chart; the control word is this design's. Purely combinational.
module ff_gen import ddfs_pkg::*; #(
  parameter logic [31:0] CFR_WORD = CFR_SINGLE_TONE
) (
  input  logic [STEP_W-1:0] step,
  input  logic [31:0]       ftw,
  output dds_wr_t           wr
);
  always_comb begin
    wr = '0;
    if (step < 4) begin
      wr.addr = ADDR_CFR + DDS_AW'(step[1:0]);
      wr.data = CFR_WORD[8*step[1:0] +: 8];
    end else begin
      wr.addr = ADDR_FTW0 + DDS_AW'(step[1:0]);
      wr.data = ftw[8*step[1:0] +: 8];
    end
    wr.fud_after = (step >= 7);
    wr.last      = (step >= 7);
  end
endmodule
