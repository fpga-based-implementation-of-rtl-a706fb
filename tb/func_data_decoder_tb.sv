// func_data_decoder_tb: sends descriptor/data commands to func_data_decoder and
// checks the function register and timer writes it makes: the 100 MHz example
// (descriptors 00-03 with bytes 00 00 00 10 give FTW 0x19999999), random FF and
// TDM frequencies, the FM base (centre FTW less half the deviation) for each
// deviation, the mode byte, the TDM and ADC timer words and the chirp period
// from start/stop/step/ramp-rate. Expected values are computed here.
`timescale 1ns/1ps
module func_data_decoder_tb;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, latch = 0, go = 0, busy, fr_we, tmr_we;
  logic [7:0] desc_in, byte_in;
  fr_idx_e fr_idx;
  tmr_sel_e tmr_sel;
  logic [31:0] fr_wdata, tmr_wdata, freq_acc, ftw_out;
  int checks = 0, failures = 0;
  logic [31:0] fr_last [16];
  int          fr_cnt  [16];
  logic [31:0] tmr_last [4];
  int          tmr_cnt  [4];
  longint unsigned devs [4] = '{64'd8000, 64'd15000, 64'd30000, 64'd100000};

  func_data_decoder dut (.clk, .rst_n, .latch, .go, .desc_in, .byte_in, .busy, .fr_we, .fr_idx,
                         .fr_wdata, .tmr_we, .tmr_sel, .tmr_wdata, .freq_acc, .ftw_out);
  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (fr_we)  begin fr_last[fr_idx] <= fr_wdata;   fr_cnt[fr_idx]++; end
    if (tmr_we) begin tmr_last[tmr_sel] <= tmr_wdata; tmr_cnt[tmr_sel]++; end
  end

  task automatic send(input logic [7:0] d, input logic [7:0] b);
    @(negedge clk); desc_in = d; byte_in = b; latch = 1;
    @(negedge clk); latch = 0; go = 1;
    @(negedge clk); go = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic logic [31:0] to_bcd(input longint unsigned v);
    logic [31:0] r;
    for (int i = 0; i < 8; i++) begin r[4*i +: 4] = 4'(v % 10); v = v / 10; end
    return r;
  endfunction

  function automatic logic [31:0] ftw_of(input longint unsigned units);
    return 32'((units * 64'd42949672960) / 64'd1_000_000_000);
  endfunction

  task automatic send_freq(input logic [3:0] code, input longint unsigned units);
    logic [31:0] b;
    b = to_bcd(units);
    for (int i = 0; i < 4; i++) send({code, 4'(i)}, b[8*i +: 8]);
  endtask

  task automatic send_word(input logic [3:0] code, input logic [31:0] w, input int n);
    for (int i = 0; i < n; i++) send({code, 4'(i)}, w[8*i +: 8]);
  endtask

  task automatic expect_fr(input fr_idx_e i, input logic [31:0] v, input string what);
    checks++;
    if (fr_last[i] !== v) begin failures++; $display("FAIL %s: reg %0d = %h expect %h", what, i, fr_last[i], v); end
  endtask

  initial begin
    longint unsigned u, s0, s1, st;
    logic [31:0] half, ftw_c;
    desc_in = 0; byte_in = 0;
    for (int i = 0; i < 16; i++) begin fr_last[i] = 0; fr_cnt[i] = 0; end
    for (int i = 0; i < 4; i++) begin tmr_last[i] = 0; tmr_cnt[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the 100 MHz example
    send(8'h00, 8'h00); send(8'h01, 8'h00); send(8'h02, 8'h00);
    checks++; if (fr_cnt[FR_FTW_FF] != 0) begin failures++; $display("FAIL write before last byte"); end
    send(8'h03, 8'h10);
    checks++; if (freq_acc !== 32'h1000_0000) begin failures++; $display("FAIL freq_acc %h", freq_acc); end
    expect_fr(FR_FTW_FF, 32'h1999_9999, "100 MHz");
    for (int n = 0; n < 20; n++) begin
      u = $urandom_range(0, 40_000_000);
      send_freq(D_FF_FREQ, u);  expect_fr(FR_FTW_FF, ftw_of(u), "FF");
      u = $urandom_range(2_000_000, 10_000_000);
      send_freq(desc_e'(D_TDM_F0 + n % 4), u);
      expect_fr(fr_idx_e'(FR_FTW_TDM0 + n % 4), ftw_of(u), "TDM");
    end
    // FM: deviation then centre, and centre then deviation
    for (int d = 0; d < 4; d++) begin
      half = 32'((64'd8192 * devs[d] * 64'd262144 + 64'd500_000_000) / 64'd1_000_000_000);
      u = 64'd4_500_000 + 64'(d);
      send(8'hA0, 8'(d));
      expect_fr(FR_DEV, 32'(d), "deviation code");
      send_freq(D_FM_FREQ, u);
      expect_fr(FR_FTW_FM, ftw_of(u) - half, "FM base");
    end
    u = 64'd6_000_000; ftw_c = ftw_of(u);
    send_freq(D_FM_FREQ, u);
    send(8'hA0, 8'd1);
    half = 32'((64'd8192 * devs[1] * 64'd262144 + 64'd500_000_000) / 64'd1_000_000_000);
    expect_fr(FR_FTW_FM, ftw_c - half, "FM base after deviation change");
    // mode
    send(8'hB0, 8'h0E);
    checks++; if (fr_last[FR_MODE][3:0] !== 4'hE) begin failures++; $display("FAIL mode write"); end
    // timers
    send_word(D_TDM_TIME, 32'h0001_2345, 4);
    checks++; if (tmr_last[TMR_TDM] !== 32'h0001_2345) begin failures++; $display("FAIL TDM time"); end
    send_word(D_ADC_TIME, 32'd100, 4);
    checks++; if (tmr_last[TMR_ADC] !== 32'd100) begin failures++; $display("FAIL ADC time"); end
    // chirp 45 -> 65 MHz, 12.5 kHz steps, RRW 3
    s0 = 64'd4_500_000; s1 = 64'd6_500_000; st = 64'd1_250;
    send_freq(D_CRP_START, s0); expect_fr(FR_FTW_CRP, ftw_of(s0), "chirp start");
    send_freq(D_CRP_STOP, s1);
    send_freq(D_CRP_STEP, st);  expect_fr(FR_DFTW, ftw_of(st), "chirp step");
    send_word(D_CRP_RRW, 32'd3, 2); expect_fr(FR_RRW, 32'd3, "ramp rate word");
    begin
      longint unsigned num, den, q;
      num = 64'(ftw_of(s1) - ftw_of(s0)) * 64'd4 * 64'd400;
      den = 64'(ftw_of(st)) * 64'd1000;
      q = (num + den - 1) / den;
      checks++;
      if (tmr_last[TMR_CRP] !== 32'(q)) begin failures++; $display("FAIL chirp period %0d expect %0d", tmr_last[TMR_CRP], q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
