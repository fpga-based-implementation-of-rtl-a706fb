// bcd_to_ftw_tb: drives BCD frequencies into bcd_to_ftw and compares the FTW
// with floor(f_units * 10 * 2^32 / 1e9), computed here in 64-bit integers.
// Covers the 100 MHz example (BCD 10000000 -> 0x19999999), values whose exact
// FTW is an integer, the 0-400 MHz range and random digits; checks the
// two-clock latency.
`timescale 1ns/1ps
module bcd_to_ftw_tb;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, valid;
  logic [31:0] bcd, ftw;
  int checks = 0, failures = 0;

  bcd_to_ftw dut (.clk, .rst_n, .start, .bcd, .valid, .ftw);
  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] to_bcd(input longint unsigned v);
    logic [31:0] r;
    for (int i = 0; i < 8; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic run(input longint unsigned units);
    longint unsigned expect_ftw;
    int lat;
    expect_ftw = (units * 64'd42949672960) / 64'd1_000_000_000;  // units*10*2^32/1e9
    @(negedge clk);
    bcd = to_bcd(units);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (ftw !== 32'(expect_ftw) || lat != 2) begin
      failures++;
      $display("FAIL units=%0d ftw=%h expect=%h latency=%0d", units, ftw, 32'(expect_ftw), lat);
    end
  endtask

  initial begin
    bcd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(64'd10_000_000);          // 100 MHz
    checks++;
    if (ftw !== 32'h1999_9999) begin failures++; $display("FAIL 100 MHz example"); end
    run(0); run(1); run(64'd390_625); run(64'd781_250); run(64'd2_000_000);
    run(64'd40_000_000); run(64'd99_999_999); run(64'd4_500_000); run(64'd6_500_000);
    run(64'd1_250);               // 12.5 kHz chirp step
    for (int i = 0; i < 300; i++) run(64'($urandom_range(0, 99_999_999)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
