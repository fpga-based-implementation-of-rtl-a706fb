// ddfs_data_gen_tb: for each mode, steps ddfs_data_gen through its write list
// with 'load' and checks that the address/data buffers show the mode's list
// (worked out here from the function register values) one clock after each
// load and hold between loads; checks the FM snapshot of base + delta.
`timescale 1ns/1ps
module ddfs_data_gen_tb;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, fm_latch = 0;
  mode_e mode;
  func_regs_t regs;
  logic [31:0] delta_ftw;
  logic [STEP_W-1:0] step;
  dds_wr_t cur;
  dds_bus_t bus;
  int checks = 0, failures = 0;

  ddfs_data_gen dut (.clk, .rst_n, .mode, .regs, .delta_ftw, .step, .load, .fm_latch, .cur, .bus);
  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected entry s of the list of mode m: {addr, data, last}
  function automatic logic [13:0] expect_wr(input mode_e m, input int s, input logic [31:0] fm_ftw);
    int pa [4] = '{10, 16, 22, 28};
    logic [31:0] cfr;
    cfr = (m == MODE_CHIRP) ? 32'h0028_0000 : 32'h0;
    if (s < 4) return {5'(s), cfr[8*s +: 8], 1'b0};
    case (m)
      MODE_FF: return {5'(10 + s - 4), regs.ftw_ff[8*(s-4) +: 8], 1'(s == 7)};
      MODE_FM: return {5'(10 + s - 4), fm_ftw[8*(s-4) +: 8], 1'(s == 7)};
      MODE_TDM: begin
        int p = (s - 4) / 4, b = (s - 4) % 4;
        return {5'(pa[p] + b), regs.ftw_tdm[p][8*b +: 8], 1'(b == 3 && p == int'(regs.tdm_last))};
      end
      default: begin
        if (s < 8)  return {5'(10 + s - 4), regs.ftw_crp[8*(s-4) +: 8], 1'b0};
        if (s < 12) return {5'(4 + s - 8), regs.dftw[8*(s-8) +: 8], 1'b0};
        return {5'(8 + s - 12), regs.rrw[8*(s-12) +: 8], 1'(s == 13)};
      end
    endcase
  endfunction

  initial begin
    regs = '0; delta_ftw = 0; step = 0; mode = MODE_FF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [31:0] fm_ftw;
      int s;
      logic [13:0] e;
      regs.ftw_ff = $urandom; regs.ftw_fm_base = $urandom; regs.ftw_crp = $urandom;
      regs.dftw = $urandom; regs.rrw = 16'($urandom); regs.tdm_last = 2'(n % 4);
      for (int p = 0; p < 4; p++) regs.ftw_tdm[p] = $urandom;
      delta_ftw = $urandom_range(0, 429496);
      mode = mode_e'(n % 4);
      fm_ftw = regs.ftw_fm_base + delta_ftw;
      @(negedge clk); fm_latch = 1;
      @(negedge clk); fm_latch = 0; delta_ftw = delta_ftw + 7;
      s = 0;
      do begin
        step = STEP_W'(s);
        @(negedge clk); load = 1;
        @(negedge clk); load = 0;
        e = expect_wr(mode, s, fm_ftw);
        checks++;
        if ({bus.addr, bus.data} !== e[13:1] || cur.last !== e[0]) begin
          failures++;
          $display("FAIL mode %0d step %0d: %h/%h last %b expect %h/%h last %b", mode, s, bus.addr, bus.data, cur.last, e[13:9], e[8:1], e[0]);
        end
        step = STEP_W'(s + 1);   // buffers hold without load
        @(negedge clk);
        checks++;
        if ({bus.addr, bus.data} !== e[13:1]) begin failures++; $display("FAIL buffer did not hold"); end
        s++;
      end while (!e[0] && s < 24);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
