// ff_fm_gen: write list for the frequency-modulated (FM) mode. It is the FF list
// (four control bytes, four profile-0 FTW bytes, FUD) with the FTW taken from
// a snapshot of base + delta, where 'base' is the centre FTW less half the
// deviation and 'delta' the offset of the latest ADC sample. 'latch' takes the
// snapshot; the output FSM pulses it when a list starts, so the four bytes of
// one update always belong to the same sample. On each FM trigger the output
// FSM replays steps 4-7 only, as in the document's FM flow chart.
//
// Timing: 'ftw_q' holds the sum from the clock after 'latch'.
module ff_fm_gen import ddfs_pkg::*; (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              latch,
  input  logic [31:0]       base,
  input  logic [31:0]       delta,
  input  logic [STEP_W-1:0] step,
  output dds_wr_t           wr,
  output logic [31:0]       ftw_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ftw_q <= '0;
    else if (latch) ftw_q <= base + delta;
  end

  ff_gen #(.CFR_WORD(CFR_SINGLE_TONE)) u_list (.step, .ftw(ftw_q), .wr);
endmodule
