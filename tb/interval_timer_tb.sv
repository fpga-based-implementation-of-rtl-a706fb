// interval_timer_tb: loads several periods into interval_timer and measures the
// spacing of the trigger pulses and the high time of first_half; checks that
// period 0 and en = 0 stop the triggers.
`timescale 1ns/1ps
module interval_timer_tb;
  logic clk = 0, rst_n = 0, en = 0, we = 0, trg, first_half;
  logic [31:0] wdata, period;
  int checks = 0, failures = 0;

  interval_timer #(.RESET_PERIOD(32'd7)) dut (.clk, .rst_n, .en, .we, .wdata, .trg, .first_half, .period);
  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int p);
    int last_trg, n_trg, highs, cyc;
    last_trg = -1; n_trg = 0; highs = 0;
    for (cyc = 0; cyc < 6 * p + 2; cyc++) begin
      @(negedge clk);
      if (first_half && n_trg >= 1 && n_trg < 5) highs++;
      if (trg) begin
        if (last_trg >= 0) begin
          checks++;
          if (cyc - last_trg != p) begin failures++; $display("FAIL spacing %0d expect %0d", cyc - last_trg, p); end
        end
        last_trg = cyc; n_trg++;
      end
    end
    checks++;
    if (n_trg < 5) begin failures++; $display("FAIL only %0d triggers for period %0d", n_trg, p); end
    checks++;
    if (highs != 4 * (p / 2)) begin failures++; $display("FAIL first_half high %0d expect %0d", highs, 4 * (p / 2)); end
  endtask

  initial begin
    wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (period != 7) begin failures++; $display("FAIL reset period"); end
    en = 1;
    measure(7);
    for (int k = 0; k < 6; k++) begin
      int p;
      p = (k == 0) ? 2 : (k == 1) ? 100 : $urandom_range(3, 60);
      @(negedge clk); en = 0; we = 1; wdata = p;
      @(negedge clk); we = 0; en = 1;
      measure(p);
    end
    // period 0 and en = 0 give no trigger
    @(negedge clk); we = 1; wdata = 0;
    @(negedge clk); we = 0;
    repeat (50) begin @(negedge clk); checks++; if (trg) begin failures++; $display("FAIL trigger at period 0"); end end
    @(negedge clk); we = 1; wdata = 5; en = 0;
    @(negedge clk); we = 0;
    repeat (50) begin @(negedge clk); checks++; if (trg) begin failures++; $display("FAIL trigger while disabled"); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
