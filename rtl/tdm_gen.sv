// tdm_gen: write list for the time-division-multiplexed (TDM) mode. Steps 0-3
// write the control register; then, for each profile p = 0..last, four steps
// write the bytes of that profile's FTW (least significant first) and the
// fourth is followed by a FUD, as in the document's TDM flow chart. 'last' is
// the number of TDM frequencies minus one (up to four profiles). Switching
// between the programmed profiles is done later by the output FSM through the
// profile-select lines. Purely combinational.
module tdm_gen import ddfs_pkg::*; (
  input  logic [STEP_W-1:0]  step,
  input  logic [3:0][31:0]   ftw,
  input  logic [1:0]         last,
  output dds_wr_t            wr
);
  logic [STEP_W-1:0] rel;
  logic [1:0]        prof;

  always_comb begin
    wr   = '0;
    rel  = step - STEP_W'(4);
    prof = rel[3:2];
    if (step < 4) begin
      wr.addr = ADDR_CFR + DDS_AW'(step[1:0]);
      wr.data = CFR_SINGLE_TONE[8*step[1:0] +: 8];
    end else begin
      wr.addr      = profile_ftw_addr(prof) + DDS_AW'(rel[1:0]);
      wr.data      = ftw[prof][8*rel[1:0] +: 8];
      wr.fud_after = (rel[1:0] == 2'd3);
      wr.last      = (rel[1:0] == 2'd3) && (prof >= last);
    end
  end
endmodule
