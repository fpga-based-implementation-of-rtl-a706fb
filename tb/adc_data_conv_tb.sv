// adc_data_conv_tb: feeds ADC codes for every deviation setting and compares the
// delta FTW with the sum over the seven 2-bit slices of
// round(v * 4^k * dev * 2^18 / 1e9), worked out here in 64-bit integers; also
// checks that the result is within 4 of the unrounded code * dev * 2^18 / 1e9
// and the one-clock latency.
`timescale 1ns/1ps
module adc_data_conv_tb;
  logic clk = 0, rst_n = 0;
  logic [13:0] adc_data;
  logic [1:0]  dev_sel;
  logic [31:0] delta_ftw;
  int checks = 0, failures = 0;
  longint unsigned devs [4] = '{64'd8000, 64'd15000, 64'd30000, 64'd100000};

  adc_data_conv dut (.clk, .rst_n, .adc_data, .dev_sel, .delta_ftw);
  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned model(input int d, input int code);
    longint unsigned s = 0, n;
    for (int k = 0; k < 7; k++) begin
      n = 64'((code >> (2 * k)) & 3) * (64'd1 << (2 * k)) * devs[d] * 64'd262144;
      s += (n + 64'd500_000_000) / 64'd1_000_000_000;
    end
    return s;
  endfunction

  task automatic run(input int d, input int code);
    longint unsigned m, exact_x1e9, lo, hi;
    @(negedge clk);
    dev_sel = 2'(d); adc_data = 14'(code);
    @(negedge clk);
    m = model(d, code);
    exact_x1e9 = 64'(code) * devs[d] * 64'd262144;
    lo = m * 64'd1_000_000_000; hi = exact_x1e9;
    checks++;
    if (64'(delta_ftw) != m) begin
      failures++; $display("FAIL dev %0d code %0d got %0d expect %0d", d, code, delta_ftw, m);
    end
    checks++;
    if ((lo > hi ? lo - hi : hi - lo) > 64'd4_000_000_000) begin
      failures++; $display("FAIL dev %0d code %0d far from exact", d, code);
    end
  endtask

  initial begin
    adc_data = 0; dev_sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      run(d, 0); run(d, 8192); run(d, 16383); run(d, 1); run(d, 5461);
      for (int i = 0; i < 200; i++) run(d, $urandom_range(0, 16383));
    end
    // 100 kHz full scale is 16383/16384 * 100e3 * 2^32 / 1e9 = 429470.5 FTW steps
    run(3, 16383);
    checks++; if (delta_ftw < 32'd429467 || delta_ftw > 32'd429474) begin failures++; $display("FAIL full scale %0d", delta_ftw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
