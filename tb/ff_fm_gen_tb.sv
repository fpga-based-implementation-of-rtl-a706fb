// ff_fm_gen_tb: checks that ff_fm_gen snapshots base + delta only on 'latch'
// (a later change of delta does not alter the bytes being written) and that
// its eight-step list carries the snapshot in FTW bytes 0x0A-0x0D.
`timescale 1ns/1ps
module ff_fm_gen_tb;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, latch = 0;
  logic [31:0] base, delta, ftw_q;
  logic [STEP_W-1:0] step;
  dds_wr_t wr;
  int checks = 0, failures = 0;

  ff_fm_gen dut (.clk, .rst_n, .latch, .base, .delta, .step, .wr, .ftw_q);
  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base = 0; delta = 0; step = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [31:0] snap;
      @(negedge clk);
      base = $urandom; delta = $urandom_range(0, 500);
      snap = base + delta;
      latch = 1;
      @(negedge clk);
      latch = 0;
      delta = delta + 1;   // must not reach the list
      for (int s = 0; s < 8; s++) begin
        step = STEP_W'(s);
        @(negedge clk);
        checks++;
        if (s < 4) begin
          if (wr.addr !== 5'(s) || wr.data !== CFR_SINGLE_TONE[8*s +: 8]) begin failures++; $display("FAIL cfr step %0d", s); end
        end else if (wr.addr !== 5'(10 + s - 4) || wr.data !== snap[8*(s-4) +: 8] || wr.last !== (s == 7) || wr.fud_after !== (s == 7)) begin
          failures++; $display("FAIL ftw step %0d: %h/%h expect %h", s, wr.addr, wr.data, snap[8*(s-4) +: 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
