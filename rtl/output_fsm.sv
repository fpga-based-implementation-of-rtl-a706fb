// output_fsm: sequences everything the controller puts on the DDS command lines.
//
// After reset it holds the DDS in reset for RESET_CYCLES clocks. On the start
// operation strobe it takes the mode from the function registers and plays the
// mode's write list from step 0. Each byte write takes four clocks:
//   SETUP : the address/data buffers load the entry for the current step
//   ADDR  : address and data stand on the port, write strobe high
//   WR    : write strobe (active low) asserted
//   HOLD  : strobe released, address and data still held
// An entry flagged fud_after is followed by one clock of FUD (frequency
// update). At the end of the list the FSM waits for a trigger or a new start:
//   FM   : an FM trigger snapshots base + delta and replays the four FTW bytes
//          and the FUD (steps 4-7);
//   TDM  : a TDM trigger moves the profile-select lines to the next profile,
//          wrapping after the last programmed one;
//   chirp: a chirp trigger issues a FUD, which restarts the sweep.
// A start strobe that arrives while a list is being written is kept and served
// when the list ends. The RF output switch follows the RF on/off input. The
// timers run only in the mode that uses them. The flow charts of the document
// give the order of writes, FUDs and triggers; the four-clock write cycle, the
// reset pulse and the pending start are this design's.
//
// All DDS control lines are registered; rd_n stays high, as the controller
// never reads the DDS. The two assertions at the end (no FUD during a write
// strobe, writes only while a list runs) are disabled during reset; their
// 'disable iff' makes lint tools report rst_n as used both synchronously and
// asynchronously, which is expected.
module output_fsm import ddfs_pkg::*; #(
  parameter int unsigned RESET_CYCLES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_strobe,   // from the host, asynchronous
  input  logic              rf_on,          // from the host, asynchronous
  input  mode_e             cfg_mode,
  input  logic [1:0]        cfg_tdm_last,
  input  logic              trg_tdm,
  input  logic              trg_crp,
  input  logic              trg_fm,
  input  dds_wr_t           cur,
  output mode_e             mode_q,
  output logic [STEP_W-1:0] step,
  output logic              load,
  output logic              fm_latch,
  output logic              en_tdm,
  output logic              en_crp,
  output logic              en_adc,
  output logic              busy,
  output dds_ctrl_t         ctrl
);
  typedef enum logic [2:0] {S_RESET, S_IDLE, S_SETUP, S_ADDR, S_WR, S_HOLD, S_FUD, S_WAIT} ostate_e;

  ostate_e     state, state_d;
  logic        start_rise, rf_level, start_level_unused, rf_rise_unused;
  logic        start_pend, fud_only, running;
  logic [1:0]  tdm_last_q;
  logic [7:0]  rst_cnt;
  logic        go, fm_go;

  strobe_sync u_start (.clk, .rst_n, .async_in(start_strobe), .level(start_level_unused), .rise(start_rise));
  strobe_sync u_rf    (.clk, .rst_n, .async_in(rf_on),        .level(rf_level),           .rise(rf_rise_unused));

  // a start is taken in IDLE or WAIT, either fresh or left pending
  assign go    = (state == S_IDLE || state == S_WAIT) && (start_rise || start_pend);
  assign fm_go = !go && state == S_WAIT && mode_q == MODE_FM && trg_fm;

  always_comb begin
    state_d = state;
    unique case (state)
      S_RESET: if (rst_cnt == 0) state_d = S_IDLE;
      S_IDLE:  if (go) state_d = S_SETUP;
      S_SETUP: state_d = S_ADDR;
      S_ADDR:  state_d = S_WR;
      S_WR:    state_d = S_HOLD;
      S_HOLD:  state_d = cur.fud_after ? S_FUD : cur.last ? S_WAIT : S_SETUP;
      S_FUD:   state_d = (fud_only || cur.last) ? S_WAIT : S_SETUP;
      S_WAIT: begin
        if (go || fm_go)                             state_d = S_SETUP;
        else if (mode_q == MODE_CHIRP && trg_crp)    state_d = S_FUD;
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign load     = (state == S_SETUP);
  assign fm_latch = go || fm_go;
  assign busy     = (state != S_IDLE) && (state != S_WAIT);
  assign en_tdm   = running && mode_q == MODE_TDM   && state == S_WAIT;
  assign en_crp   = running && mode_q == MODE_CHIRP && (state == S_WAIT || (state == S_FUD && fud_only));
  assign en_adc   = running && mode_q == MODE_FM;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RESET;
      rst_cnt    <= 8'(RESET_CYCLES);
      mode_q     <= MODE_FF;
      tdm_last_q <= '0;
      step       <= '0;
      start_pend <= 1'b0;
      fud_only   <= 1'b0;
      running    <= 1'b0;
      ctrl       <= '{rf_sw: 1'b0, reset: 1'b1, ps: 2'd0, fud: 1'b0, rd_n: 1'b1, wr_n: 1'b1};
    end else begin
      state <= state_d;
      if (rst_cnt != 0) rst_cnt <= rst_cnt - 8'd1;

      if (go) begin
        start_pend <= 1'b0;
        mode_q     <= cfg_mode;
        tdm_last_q <= cfg_tdm_last;
        running    <= 1'b1;
        step       <= '0;
        ctrl.ps    <= 2'd0;
      end else if (start_rise) begin
        start_pend <= 1'b1;
      end

      if (fm_go) step <= STEP_W'(4);
      if ((state == S_HOLD && !cur.fud_after && !cur.last) ||
          (state == S_FUD && !fud_only && !cur.last))
        step <= step + STEP_W'(1);

      if (state == S_WAIT && !go && mode_q == MODE_CHIRP && trg_crp) fud_only <= 1'b1;
      else if (state == S_FUD)                                       fud_only <= 1'b0;

      if (state == S_WAIT && !go && mode_q == MODE_TDM && trg_tdm)
        ctrl.ps <= (ctrl.ps >= tdm_last_q) ? 2'd0 : ctrl.ps + 2'd1;

      ctrl.reset <= (state_d == S_RESET);
      ctrl.wr_n  <= (state_d != S_WR);
      ctrl.fud   <= (state_d == S_FUD);
      ctrl.rd_n  <= 1'b1;
      ctrl.rf_sw <= rf_level;
    end
  end

  // the write strobe and the frequency update never overlap
  assert property (@(posedge clk) disable iff (!rst_n) !(!ctrl.wr_n && ctrl.fud));
  // the port is only written while the list runs
  assert property (@(posedge clk) disable iff (!rst_n) !ctrl.wr_n |-> busy);

  logic unused_sync;
  assign unused_sync = start_level_unused ^ rf_rise_unused;
endmodule
