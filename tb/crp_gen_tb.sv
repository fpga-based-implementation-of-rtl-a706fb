// crp_gen_tb: walks crp_gen's fourteen-step chirp list and checks every entry:
// control bytes with sweep enable and accumulator auto-clear, start FTW at
// 0x0A-0x0D, step word at 0x04-0x07, ramp-rate word at 0x08-0x09, FUD and end
// flag on the last entry.
`timescale 1ns/1ps
module crp_gen_tb;
  import ddfs_pkg::*;
  logic [STEP_W-1:0] step;
  logic [31:0] ftw_start, dftw;
  logic [15:0] rrw;
  dds_wr_t wr;
  int checks = 0, failures = 0;

  crp_gen dut (.step, .ftw_start, .dftw, .rrw, .wr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] cfr;
    cfr = 32'h0028_0000;   // bits 21 and 19
    for (int n = 0; n < 50; n++) begin
      ftw_start = $urandom; dftw = $urandom; rrw = 16'($urandom);
      for (int s = 0; s < 14; s++) begin
        logic [4:0] ea; logic [7:0] ed;
        step = STEP_W'(s);
        #1;
        if (s < 4)       begin ea = 5'(s);          ed = cfr[8*s +: 8]; end
        else if (s < 8)  begin ea = 5'(10 + s - 4); ed = ftw_start[8*(s-4) +: 8]; end
        else if (s < 12) begin ea = 5'(4 + s - 8);  ed = dftw[8*(s-8) +: 8]; end
        else             begin ea = 5'(8 + s - 12); ed = rrw[8*(s-12) +: 8]; end
        checks++;
        if (wr.addr !== ea || wr.data !== ed || wr.fud_after !== (s == 13) || wr.last !== (s == 13)) begin
          failures++;
          $display("FAIL step %0d: %h/%h expect %h/%h", s, wr.addr, wr.data, ea, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
