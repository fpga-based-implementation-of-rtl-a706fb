// input_fsm_tb: raises the data ready strobe and checks that input_fsm gives
// one latch pulse and then one go pulse, four and five clock edges after the
// strobe edge, waits for the decoder to finish, and counts a strobe that arrives
// while the decoder is busy as an overrun.
`timescale 1ns/1ps
module input_fsm_tb;
  logic clk = 0, rst_n = 0, strobe = 0, dec_busy = 0, latch, go;
  logic [7:0] overruns;
  int checks = 0, failures = 0;
  int n_latch = 0, n_go = 0, cyc = 0, t_latch = 0, t_go = 0;

  input_fsm dut (.clk, .rst_n, .data_ready_strobe(strobe), .dec_busy, .latch, .go, .overruns);
  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cyc++;
    if (latch) begin n_latch++; t_latch = cyc; end
    if (go) begin n_go++; t_go = cyc; end
    if (go) dec_busy <= 1;   // decoder model: busy for 20 clocks
  end

  initial begin
    forever begin
      @(posedge dec_busy);
      repeat (20) @(negedge clk);
      dec_busy = 0;
    end
  end

  task automatic cmd(input bit expect_taken);
    int l0, g0, c0;
    l0 = n_latch; g0 = n_go;
    @(negedge clk); strobe = 1; c0 = cyc;
    repeat (8) @(negedge clk);
    strobe = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (expect_taken) begin
      if (n_latch != l0 + 1 || n_go != g0 + 1 || t_latch - c0 != 4 || t_go != t_latch + 1) begin
        failures++; $display("FAIL latch %0d go %0d at %0d/%0d", n_latch - l0, n_go - g0, t_latch - c0, t_go - c0);
      end
    end else if (n_latch != l0 || n_go != g0) begin
      failures++; $display("FAIL strobe taken while busy");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      cmd(1);
      repeat (30) @(negedge clk);
    end
    cmd(1);
    cmd(0);              // arrives while busy
    repeat (30) @(negedge clk);
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL overruns %0d", overruns); end
    cmd(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
