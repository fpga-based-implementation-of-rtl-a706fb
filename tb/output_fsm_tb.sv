// output_fsm_tb: runs output_fsm against a model write list (eight entries for
// FF/FM, twenty for four-frequency TDM, fourteen for chirp, with FUD flags as in
// the flow charts) and checks: the DDS reset pulse; one write strobe per entry,
// in step order, four clocks apart; FUD after the flagged entries; FM triggers
// replaying steps 4-7 and a FUD; TDM triggers cycling the profile lines
// 0,1,2,3,0; chirp triggers giving a bare FUD; a start strobe during a list kept
// until the list ends; RF switch following rf_on; and the timer enables.
`timescale 1ns/1ps
module output_fsm_tb;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, start_strobe = 0, rf_on = 0, trg_tdm = 0, trg_crp = 0, trg_fm = 0;
  mode_e cfg_mode, mode_q;
  logic [1:0] cfg_tdm_last;
  dds_wr_t cur;
  logic [STEP_W-1:0] step;
  logic load, fm_latch, en_tdm, en_crp, en_adc, busy;
  dds_ctrl_t ctrl;
  int checks = 0, failures = 0;
  int cyc = 0, n_wr = 0, n_fud = 0, n_latch = 0, last_wr_cyc = -100;
  int steps_written [$];
  logic prev_wr_n = 1, prev_fud = 0;

  output_fsm dut (.clk, .rst_n, .start_strobe, .rf_on, .cfg_mode, .cfg_tdm_last, .trg_tdm, .trg_crp,
                  .trg_fm, .cur, .mode_q, .step, .load, .fm_latch, .en_tdm, .en_crp, .en_adc, .busy, .ctrl);
  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model list
  always_comb begin
    cur = '0;
    cur.addr = 5'(step);
    case (mode_q)
      MODE_TDM:   begin cur.fud_after = step >= 4 && step[1:0] == 2'd3; cur.last = (step == 19); end
      MODE_CHIRP: begin cur.fud_after = (step == 13); cur.last = (step == 13); end
      default:    begin cur.fud_after = (step == 7);  cur.last = (step == 7); end
    endcase
  end

  always @(negedge clk) begin
    cyc++;
    if (prev_wr_n && !ctrl.wr_n) begin
      n_wr++;
      steps_written.push_back(int'(step));
      if (cyc - last_wr_cyc < 4) begin failures++; checks++; $display("FAIL writes %0d clocks apart", cyc - last_wr_cyc); end
      last_wr_cyc = cyc;
    end
    if (!prev_fud && ctrl.fud) n_fud++;
    if (fm_latch) n_latch++;
    prev_wr_n = ctrl.wr_n; prev_fud = ctrl.fud;
  end

  task automatic strobe();
    @(negedge clk); start_strobe = 1;
    repeat (5) @(negedge clk);
    start_strobe = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    repeat (6) @(negedge clk);
    while (busy && n < 1000) begin @(negedge clk); n++; end
    @(negedge clk);
  endtask

  task automatic expect_writes(input int first, input int count, input int fuds, input string what);
    checks++;
    if (steps_written.size() != count || n_fud != fuds) begin
      failures++; $display("FAIL %s: %0d writes, %0d FUDs, expect %0d, %0d", what, steps_written.size(), n_fud, count, fuds);
    end else
      for (int i = 0; i < count; i++) if (steps_written[i] != first + i) begin
        failures++; $display("FAIL %s: write %0d was step %0d", what, i, steps_written[i]); break;
      end
    steps_written.delete(); n_fud = 0;
  endtask

  task automatic pulse(ref logic t);
    @(negedge clk); t = 1;
    @(negedge clk); t = 0;
  endtask

  initial begin
    cfg_mode = MODE_FF; cfg_tdm_last = 2'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (!ctrl.reset) begin failures++; $display("FAIL no DDS reset"); end
    repeat (30) @(negedge clk);
    checks++; if (ctrl.reset || !ctrl.rd_n || !ctrl.wr_n) begin failures++; $display("FAIL idle lines"); end
    // FF
    strobe(); wait_idle();
    expect_writes(0, 8, 1, "FF");
    checks++; if (en_tdm || en_crp || en_adc) begin failures++; $display("FAIL timer enabled in FF"); end
    // FM: list, then two triggers
    cfg_mode = MODE_FM; n_latch = 0;
    strobe(); wait_idle();
    expect_writes(0, 8, 1, "FM start");
    checks++; if (!en_adc) begin failures++; $display("FAIL ADC timer off in FM"); end
    repeat (2) begin
      pulse(trg_fm); wait_idle();
      expect_writes(4, 4, 1, "FM trigger");
    end
    checks++; if (n_latch != 3) begin failures++; $display("FAIL %0d FM snapshots", n_latch); end
    // TDM
    cfg_mode = MODE_TDM;
    strobe(); wait_idle();
    expect_writes(0, 20, 4, "TDM");
    checks++; if (!en_tdm || ctrl.ps != 0) begin failures++; $display("FAIL TDM wait state"); end
    for (int i = 1; i <= 5; i++) begin
      pulse(trg_tdm); @(negedge clk);
      checks++; if (ctrl.ps != 2'(i % 4)) begin failures++; $display("FAIL profile %0d expect %0d", ctrl.ps, i % 4); end
    end
    // TDM with two frequencies: 0,1,0
    cfg_tdm_last = 2'd1;
    strobe(); wait_idle();
    steps_written.delete(); n_fud = 0;
    pulse(trg_tdm); @(negedge clk); pulse(trg_tdm); @(negedge clk);
    checks++; if (ctrl.ps != 0) begin failures++; $display("FAIL two-profile wrap"); end
    // chirp
    cfg_mode = MODE_CHIRP;
    strobe(); wait_idle();
    expect_writes(0, 14, 1, "chirp");
    checks++; if (!en_crp) begin failures++; $display("FAIL chirp timer off"); end
    repeat (3) begin pulse(trg_crp); repeat (4) @(negedge clk); end
    expect_writes(0, 0, 3, "chirp retrigger");
    // start while busy is kept
    cfg_mode = MODE_FF;
    strobe();
    repeat (8) @(negedge clk);
    strobe();
    wait_idle(); repeat (60) @(negedge clk); wait_idle();
    checks++;
    if (steps_written.size() != 16 || n_fud != 2 || steps_written[8] != 0) begin
      failures++; $display("FAIL pending start: %0d writes, %0d FUDs", steps_written.size(), n_fud);
    end
    steps_written.delete(); n_fud = 0;
    // rf switch
    rf_on = 1; repeat (5) @(negedge clk);
    checks++; if (!ctrl.rf_sw) begin failures++; $display("FAIL RF switch on"); end
    rf_on = 0; repeat (5) @(negedge clk);
    checks++; if (ctrl.rf_sw) begin failures++; $display("FAIL RF switch off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
