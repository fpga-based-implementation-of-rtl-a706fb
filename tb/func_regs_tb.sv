// func_regs_tb: writes every function register through the indexed port with
// random data and checks each field of the register struct, including reset
// values and that a write leaves the other registers alone.
`timescale 1ns/1ps
module func_regs_tb;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  fr_idx_e idx;
  logic [31:0] wdata;
  func_regs_t regs, model;
  int checks = 0, failures = 0;

  func_regs dut (.clk, .rst_n, .we, .idx, .wdata, .regs);
  always #10 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    checks++;
    if (regs !== model) begin
      failures++;
      $display("FAIL %s: got %h expect %h", what, regs, model);
    end
  endtask

  initial begin
    idx = FR_FTW_FF; wdata = 0;
    model = '0; model.mode = MODE_FF; model.tdm_last = 2'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all("reset");
    for (int n = 0; n < 200; n++) begin
      logic [3:0] i;
      i = 4'($urandom_range(0, 10));
      @(negedge clk);
      we = 1; idx = fr_idx_e'(i); wdata = $urandom;
      case (i)
        0: model.ftw_ff = wdata;
        1: model.ftw_fm_base = wdata;
        2, 3, 4, 5: model.ftw_tdm[i-2] = wdata;
        6: model.ftw_crp = wdata;
        7: model.dftw = wdata;
        8: model.rrw = wdata[15:0];
        9: begin model.mode = mode_e'(wdata[1:0]); model.tdm_last = wdata[3:2]; end
        default: model.dev_sel = wdata[1:0];
      endcase
      @(negedge clk);
      we = 0;
      check_all("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
