// ddfs_controller_tb: end-to-end test of the controller at its default
// parameters, acting as the host PC, the DDS chip (ad9858_model) and the ADC.
//   FF    : the nine Table-1 frequencies that 10 Hz BCD can express, from
//           20 MHz to 400 MHz; each must reach the DDS profile-0 FTW as
//           floor(f * 2^32 / 1 GHz) and the start-to-FUD time must stay below
//           the 20 us switching specification.
//   FM    : 45 MHz centre, 15 kHz and then 100 kHz deviation, a 25 kHz sine
//           on the ADC; every update must lie in the deviation band, updates
//           must come every 100 clocks (500 kHz), the swing must match the
//           deviation and a held sample must give exactly base +
//           split-and-add(sample).
//   TDM   : four frequencies, 4 us dwell; profile FTWs and the profile line
//           sequence 0,1,2,3,0,... at the dwell time are checked.
//   chirp : 45 -> 65 MHz in 12.5 kHz steps; the DDS sweep registers and the
//           restart period (ceil of the sweep time in clocks) are checked.
// The test counts how often each mechanism happened (FF programming, FM update,
// TDM profile switch, chirp restart, RF on/off, a dropped early command) and
// fails if one never did. Setup and hold at the DDS port are checked by the
// model throughout.
`timescale 1ns/1ps
module ddfs_controller_tb;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, rf_on = 0, start_strobe = 0, data_ready_strobe = 0;
  logic [7:0] data_desc = 0, data_byte = 0, cmd_overruns;
  dds_ctrl_t dds_ctrl;
  dds_bus_t  dds_bus;
  logic adc_convert;
  logic [13:0] adc_data = 14'd8192;
  int checks = 0, failures = 0, cyc = 0;
  int n_ff = 0, n_fm = 0, n_tdm = 0, n_crp = 0, n_rf = 0, n_overrun = 0;
  longint unsigned devs [4] = '{64'd8000, 64'd15000, 64'd30000, 64'd100000};

  ddfs_controller dut (.clk, .rst_n, .rf_on, .start_strobe, .data_ready_strobe, .data_desc, .data_byte,
                       .cmd_overruns, .dds_ctrl, .dds_bus, .adc_convert, .adc_data);
  ad9858_model dds (.ctrl(dds_ctrl), .bus(dds_bus));

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC: a new sample of a 25 kHz sine at every rising edge of the convert clock
  int adc_n = 0;
  always @(posedge adc_convert) begin
    adc_n++;
    adc_data <= 14'(8192 + $rtoi(8000.0 * $sin(2.0 * 3.14159265358979 * 25.0e3 * real'(adc_n) / 500.0e3)));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] d, input logic [7:0] b);
    @(negedge clk); data_desc = d; data_byte = b; data_ready_strobe = 1;
    repeat (6) @(negedge clk);
    data_ready_strobe = 0;
    repeat (100) @(negedge clk);
  endtask

  function automatic logic [31:0] to_bcd(input longint unsigned v);
    logic [31:0] r;
    for (int i = 0; i < 8; i++) begin r[4*i +: 4] = 4'(v % 10); v = v / 10; end
    return r;
  endfunction

  function automatic logic [31:0] ftw_of(input longint unsigned units);
    return 32'((units * 64'd42949672960) / 64'd1_000_000_000);
  endfunction

  function automatic logic [31:0] split_add(input int d, input int code);
    longint unsigned s = 0, n;
    for (int k = 0; k < 7; k++) begin
      n = 64'((code >> (2 * k)) & 3) * (64'd1 << (2 * k)) * devs[d] * 64'd262144;
      s += (n + 64'd500_000_000) / 64'd1_000_000_000;
    end
    return 32'(s);
  endfunction

  task automatic send_freq(input logic [3:0] code, input longint unsigned units);
    logic [31:0] b;
    b = to_bcd(units);
    for (int i = 0; i < 4; i++) send({code, 4'(i)}, b[8*i +: 8]);
  endtask

  task automatic send_word(input logic [3:0] code, input logic [31:0] w, input int n);
    for (int i = 0; i < n; i++) send({code, 4'(i)}, w[8*i +: 8]);
  endtask

  task automatic start_op(output int t0);
    @(negedge clk); start_strobe = 1; t0 = cyc;
    repeat (6) @(negedge clk);
    start_strobe = 0;
  endtask

  // wait for the FUD count to reach n; returns the cycle
  task automatic wait_fud(input int n, output int t);
    int guard = 0;
    while (dds.fuds < n && guard < 100000) begin @(negedge clk); guard++; end
    t = cyc;
  endtask

  initial begin
    longint unsigned table1 [9] = '{64'd2_000_000, 64'd2_511_111, 64'd4_212_345, 64'd5_288_866,
                                    64'd6_100_001, 64'd7_633_996, 64'd8_200_000, 64'd32_050_000,
                                    64'd40_000_000};
    int t0, t1, f0, max_switch;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);

    // ------------------------------------------------------------------ FF
    // the 100 MHz command sequence 00/00, 01/00, 02/00, 03/10
    send(8'h00, 8'h00); send(8'h01, 8'h00); send(8'h02, 8'h00); send(8'h03, 8'h10);
    send(8'hB0, 8'h0C);                       // mode FF, four TDM frequencies
    f0 = dds.fuds;
    start_op(t0); wait_fud(f0 + 1, t1);
    check(dds.profile_ftw(0) == 32'h1999_9999, "100 MHz FTW");
    check(dds.word(0, 4) == CFR_SINGLE_TONE, "FF control word");
    max_switch = t1 - t0;
    n_ff++;
    foreach (table1[i]) begin
      send_freq(D_FF_FREQ, table1[i]);
      f0 = dds.fuds;
      start_op(t0); wait_fud(f0 + 1, t1);
      if (t1 - t0 > max_switch) max_switch = t1 - t0;
      checks++;
      if (dds.profile_ftw(0) != ftw_of(table1[i])) begin
        failures++; $display("FAIL FF %0d0 Hz: FTW %h expect %h", table1[i], dds.profile_ftw(0), ftw_of(table1[i]));
      end
      n_ff++;
    end
    $display("FF: start strobe to FUD at most %0d clocks (%0d ns)", max_switch, max_switch * 20);
    check(max_switch * 20 < 20_000, "switching time below 20 us");

    // ------------------------------------------------------------------ FM
    begin
      logic [31:0] base, lo, hi;
      int bad = 0, last_t = 0, bad_rate = 0, fm_fuds;
      base = ftw_of(64'd4_500_000) - split_add(1, 8192);
      send(8'hA0, 8'd1);                        // 15 kHz
      send_freq(D_FM_FREQ, 64'd4_500_000);      // 45 MHz
      send(8'hB0, 8'h0D);                       // mode FM
      f0 = dds.fuds;
      start_op(t0); wait_fud(f0 + 1, t1);
      lo = 32'hFFFF_FFFF; hi = 0;
      fm_fuds = dds.fuds;
      for (int i = 0; i < 60; i++) begin
        wait_fud(fm_fuds + 1, t1);
        fm_fuds = dds.fuds;
        if (i > 0 && t1 - last_t != 100) bad_rate++;
        last_t = t1;
        // the FTW must be base + split_add of some sample the ADC produced
        if (dds.profile_ftw(0) < base || dds.profile_ftw(0) > base + split_add(1, 16383)) bad++;
        if (dds.profile_ftw(0) < lo) lo = dds.profile_ftw(0);
        if (dds.profile_ftw(0) > hi) hi = dds.profile_ftw(0);
        n_fm++;
      end
      check(bad == 0, "FM FTW within centre +- deviation/2");
      check(bad_rate == 0, "FM updates every 100 clocks (500 kHz)");
      // the sine swings over 16000 of 16384 codes: about 98 % of 64424 FTW steps
      check(hi - lo > 32'd60000 && hi - lo < 32'd64424, "FM peak-to-peak swing");
      $display("FM: FTW swing %0d steps (%0d Hz)", hi - lo, ((hi - lo) * 1000) / 4295);
    end
    // exact value check: hold the ADC still for one update
    begin
      logic [31:0] base;
      int ff;
      base = ftw_of(64'd4_500_000) - split_add(1, 8192);
      force adc_data = 14'd12345;
      ff = dds.fuds;
      wait_fud(ff + 2, t1);
      check(dds.profile_ftw(0) == base + split_add(1, 12345), "FM FTW for a known sample");
      release adc_data;
    end
    // 100 kHz deviation at the same centre: a new deviation code recomputes the
    // base; the next start runs FM with the widest tables
    begin
      logic [31:0] base, lo, hi;
      int bad = 0, fm_fuds, ff;
      base = ftw_of(64'd4_500_000) - split_add(3, 8192);
      send(8'hA0, 8'd3);                        // 100 kHz
      f0 = dds.fuds;
      start_op(t0); wait_fud(f0 + 1, t1);
      lo = 32'hFFFF_FFFF; hi = 0;
      fm_fuds = dds.fuds;
      for (int i = 0; i < 40; i++) begin
        wait_fud(fm_fuds + 1, t1);
        fm_fuds = dds.fuds;
        if (dds.profile_ftw(0) < base || dds.profile_ftw(0) > base + split_add(3, 16383)) bad++;
        if (dds.profile_ftw(0) < lo) lo = dds.profile_ftw(0);
        if (dds.profile_ftw(0) > hi) hi = dds.profile_ftw(0);
        n_fm++;
      end
      check(bad == 0, "FM 100 kHz FTW within centre +- deviation/2");
      // 16000 of 16384 codes of 429497 FTW steps: about 419430
      check(hi - lo > 32'd415000 && hi - lo < 32'd429497, "FM 100 kHz peak-to-peak swing");
      $display("FM 100 kHz: FTW swing %0d steps (%0d Hz)", hi - lo, ((hi - lo) * 1000) / 4295);
      force adc_data = 14'd3000;
      ff = dds.fuds;
      wait_fud(ff + 2, t1);
      check(dds.profile_ftw(0) == base + split_add(3, 3000), "FM 100 kHz FTW for a known sample");
      release adc_data;
    end

    // ------------------------------------------------------------------ TDM
    begin
      longint unsigned tf [4] = '{64'd2_000_000, 64'd4_212_345, 64'd6_100_001, 64'd8_200_000};
      int seq_bad = 0, last_t = 0, dwell_bad = 0;
      logic [1:0] prev_ps;
      for (int p = 0; p < 4; p++) send_freq(desc_e'(D_TDM_F0 + p), tf[p]);
      send_word(D_TDM_TIME, 32'd200, 4);       // 4 us dwell
      send(8'hB0, 8'h0E);                      // mode TDM, four frequencies
      f0 = dds.fuds;
      start_op(t0); wait_fud(f0 + 4, t1);
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (dds.profile_ftw(p) != ftw_of(tf[p])) begin failures++; $display("FAIL TDM profile %0d", p); end
      end
      check(dds_ctrl.ps == 0, "TDM starts on profile 0");
      prev_ps = dds_ctrl.ps;
      for (int i = 0; i < 12; i++) begin
        int guard;
        guard = 0;
        while (dds_ctrl.ps == prev_ps && guard < 1000) begin @(negedge clk); guard++; end
        if (dds_ctrl.ps != prev_ps + 2'd1) begin seq_bad++; $display("ps %0d -> %0d at %0d", prev_ps, dds_ctrl.ps, cyc); end
        if (i > 0 && cyc - last_t != 200) dwell_bad++;
        last_t = cyc; prev_ps = dds_ctrl.ps;
        n_tdm++;
      end
      check(seq_bad == 0, "TDM profile sequence");
      check(dwell_bad == 0, "TDM dwell time 200 clocks");
    end

    // ------------------------------------------------------------------ chirp
    begin
      longint unsigned num, den, q;
      logic [31:0] a, b, s;
      int last_t, bad = 0;
      a = ftw_of(64'd4_500_000); b = ftw_of(64'd6_500_000); s = ftw_of(64'd1_250);
      send_freq(D_CRP_START, 64'd4_500_000);
      send_freq(D_CRP_STOP, 64'd6_500_000);
      send_freq(D_CRP_STEP, 64'd1_250);
      send_word(D_CRP_RRW, 32'd0, 2);
      send(8'hB0, 8'h0F);                      // mode chirp
      num = 64'(b - a) * 64'd400; den = 64'(s) * 64'd1000; q = (num + den - 1) / den;
      f0 = dds.fuds;
      start_op(t0); wait_fud(f0 + 1, t1);
      check(dds.profile_ftw(0) == a, "chirp start FTW");
      check(dds.word(4, 4) == s, "chirp step word");
      check(dds.word(8, 2) == 16'd0, "chirp ramp-rate word");
      check(dds.word(0, 4) == CFR_CHIRP, "chirp control word");
      last_t = t1;
      for (int i = 0; i < 4; i++) begin
        wait_fud(f0 + 2 + i, t1);
        if (i > 0 && t1 - last_t != int'(q)) bad++;
        last_t = t1;
        n_crp++;
      end
      check(bad == 0, "chirp restart period");
      $display("chirp: restart every %0d clocks (%0d ns)", q, q * 20);
    end

    // ------------------------------------------------------------ RF on/off
    rf_on = 1; repeat (6) @(negedge clk);
    if (dds_ctrl.rf_sw) n_rf++;
    rf_on = 0; repeat (6) @(negedge clk);
    if (!dds_ctrl.rf_sw) n_rf++;
    check(n_rf == 2, "RF switch follows rf_on");

    // ----------------------------------------------- command sent too early
    @(negedge clk); data_desc = 8'h70; data_byte = 8'h00; data_ready_strobe = 1;
    repeat (6) @(negedge clk); data_ready_strobe = 0;
    @(negedge clk); data_desc = 8'h73; data_ready_strobe = 1;   // chirp stop byte 3: long decode
    repeat (6) @(negedge clk); data_ready_strobe = 0;
    repeat (6) @(negedge clk); data_ready_strobe = 1;
    repeat (6) @(negedge clk); data_ready_strobe = 0;
    repeat (200) @(negedge clk);
    n_overrun = int'(cmd_overruns);

    check(dds.timing_errors == 0, "DDS port setup/hold");
    $display("mechanisms: FF %0d, FM update %0d, TDM switch %0d, chirp restart %0d, RF %0d, overrun %0d",
             n_ff, n_fm, n_tdm, n_crp, n_rf, n_overrun);
    check(n_ff > 0, "FF programming happened");
    check(n_fm > 0, "FM update happened");
    check(n_tdm > 0, "TDM switch happened");
    check(n_crp > 0, "chirp restart happened");
    check(n_rf > 0, "RF switching happened");
    check(n_overrun > 0, "dropped command happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
