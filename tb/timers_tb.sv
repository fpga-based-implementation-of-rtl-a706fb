// timers_tb: checks the three timers: the ADC timer runs from reset at
// 100 clocks (500 kHz at 50 MHz) with a 50 % convert clock and an FM trigger per
// period; the TDM and chirp timers stay silent until their period registers are
// written and then trigger at that period; each register write reaches only its
// own timer.
`timescale 1ns/1ps
module timers_tb;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, en_tdm = 0, en_crp = 0, en_adc = 0, we = 0;
  tmr_sel_e sel;
  logic [31:0] wdata;
  logic trg_tdm, trg_crp, trg_fm, conv_adc;
  int checks = 0, failures = 0;
  int cyc = 0, last_tdm = -1, last_crp = -1, last_fm = -1, n_tdm = 0, n_crp = 0, n_fm = 0, conv_hi = 0;
  int exp_tdm = 0, exp_crp = 0, exp_fm = 100;

  timers dut (.clk, .rst_n, .en_tdm, .en_crp, .en_adc, .we, .sel, .wdata,
              .trg_tdm, .trg_crp, .trg_fm, .conv_adc);
  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic spacing(input string nm, inout int last, inout int n, input int expect_p);
    if (n > 0) begin
      checks++;
      if (cyc - last != expect_p) begin failures++; $display("FAIL %s spacing %0d expect %0d", nm, cyc - last, expect_p); end
    end
    last = cyc; n++;
  endtask

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (trg_tdm) spacing("tdm", last_tdm, n_tdm, exp_tdm);
    if (trg_crp) spacing("crp", last_crp, n_crp, exp_crp);
    if (trg_fm)  spacing("fm",  last_fm,  n_fm,  exp_fm);
    if (conv_adc) conv_hi++;
  end

  task automatic load(input tmr_sel_e s, input int v);
    @(negedge clk); we = 1; sel = s; wdata = v;
    @(negedge clk); we = 0;
  endtask

  initial begin
    sel = TMR_TDM; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    en_tdm = 1; en_crp = 1; en_adc = 1;
    repeat (1000) @(negedge clk);
    checks++; if (n_tdm != 0 || n_crp != 0) begin failures++; $display("FAIL TDM/chirp trigger before load"); end
    checks++; if (n_fm < 9) begin failures++; $display("FAIL %0d ADC triggers in 1000 clocks", n_fm); end
    checks++; if (conv_hi < 490 || conv_hi > 510) begin failures++; $display("FAIL convert clock high %0d of 1000", conv_hi); end
    en_tdm = 0; en_crp = 0;
    exp_tdm = 37; exp_crp = 64;
    load(TMR_TDM, 37);
    load(TMR_CRP, 64);
    last_tdm = -1; last_crp = -1; n_tdm = 0; n_crp = 0;
    en_tdm = 1; en_crp = 1;
    repeat (1000) @(negedge clk);
    checks++; if (n_tdm < 25) begin failures++; $display("FAIL %0d TDM triggers", n_tdm); end
    checks++; if (n_crp < 14) begin failures++; $display("FAIL %0d chirp triggers", n_crp); end
    en_adc = 0; exp_fm = 20;
    load(TMR_ADC, 20);
    last_fm = -1; n_fm = 0; en_adc = 1;
    repeat (400) @(negedge clk);
    checks++; if (n_fm < 19) begin failures++; $display("FAIL %0d ADC triggers at period 20", n_fm); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
