// ramp_rate_calc_tb: gives ramp_rate_calc start/stop/step FTWs and ramp-rate
// words and compares the period with
// ceil(|stop-start| * (rrw+1) * 400 / (dftw * 1000)), the sweep time in 50 MHz
// clocks at a 1 GHz DDS clock and a ramp clock of f_clk/8. Checks the zero-step
// case and the latency, and the 45 -> 65 MHz band at the 12.5, 25 and 50 kHz
// chirp steps of the specification.
`timescale 1ns/1ps
module ramp_rate_calc_tb;
  logic clk = 0, rst_n = 0, start = 0, busy, valid;
  logic [31:0] ftw_start, ftw_stop, dftw, period;
  logic [15:0] rrw;
  int checks = 0, failures = 0;

  ramp_rate_calc dut (.clk, .rst_n, .start, .ftw_start, .ftw_stop, .dftw, .rrw,
                      .busy, .valid, .period);
  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] a, b, s, input logic [15:0] r);
    longint unsigned span, num, den, q;
    int lat;
    span = (b >= a) ? 64'(b - a) : 64'(a - b);
    num  = span * (64'(r) + 1) * 64'd400;
    den  = 64'(s) * 64'd1000;
    q    = (s == 0) ? 0 : (num + den - 1) / den;
    if (q > 64'hFFFF_FFFF) q = 64'hFFFF_FFFF;
    @(negedge clk);
    ftw_start = a; ftw_stop = b; dftw = s; rrw = r; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!valid && lat < 200) begin @(negedge clk); lat++; end
    checks++;
    if (period !== 32'(q) || (s != 0 && lat != 67)) begin
      failures++;
      $display("FAIL a=%h b=%h s=%h r=%h period=%0d expect=%0d lat=%0d", a, b, s, r, period, q, lat);
    end
  endtask

  initial begin
    ftw_start = 0; ftw_stop = 0; dftw = 0; rrw = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 45 -> 65 MHz in 12.5 kHz steps, RRW 0: 1600 steps * 8 ns = 12.8 us, 641 clocks
    // once the step FTW is truncated
    run(32'h0B85_1EB8, 32'h10A3_D70A, 32'h0000_D1B7, 16'd0);
    checks++;
    if (period != 32'd641) begin failures++; $display("FAIL chirp example %0d", period); end
    // the same band in 25 kHz and 50 kHz steps: 321 and 161 clocks
    run(32'h0B85_1EB8, 32'h10A3_D70A, 32'h0001_A36E, 16'd0);
    checks++;
    if (period != 32'd321) begin failures++; $display("FAIL 25 kHz step %0d", period); end
    run(32'h0B85_1EB8, 32'h10A3_D70A, 32'h0003_46DC, 16'd0);
    checks++;
    if (period != 32'd161) begin failures++; $display("FAIL 50 kHz step %0d", period); end
    run(32'h1000_0000, 32'h0800_0000, 32'h0001_0000, 16'd3);   // downward sweep
    run(32'h1000_0000, 32'h2000_0000, 32'h0000_0000, 16'd0);   // zero step
    for (int i = 0; i < 60; i++)
      run($urandom, $urandom, $urandom_range(1, 32'h00FF_FFFF), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
