// ff_gen_tb: walks ff_gen through its eight steps for random FTWs and checks
// each address, data byte and the FUD / end flags against the FF list: control
// register bytes 0x00-0x03, then FTW bytes 0x0A-0x0D, least significant first.
`timescale 1ns/1ps
module ff_gen_tb;
  import ddfs_pkg::*;
  logic [STEP_W-1:0] step;
  logic [31:0] ftw;
  dds_wr_t wr;
  int checks = 0, failures = 0;

  ff_gen #(.CFR_WORD(32'hA1B2_C3D4)) dut (.step, .ftw, .wr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] cfr;
    cfr = 32'hA1B2_C3D4;
    for (int n = 0; n < 50; n++) begin
      ftw = (n == 0) ? 32'h1999_9999 : $urandom;
      for (int s = 0; s < 8; s++) begin
        logic [4:0] ea; logic [7:0] ed;
        step = STEP_W'(s);
        #1;
        ea = (s < 4) ? 5'(s) : 5'(10 + s - 4);
        ed = (s < 4) ? cfr[8*s +: 8] : ftw[8*(s-4) +: 8];
        checks++;
        if (wr.addr !== ea || wr.data !== ed || wr.fud_after !== (s == 7) || wr.last !== (s == 7)) begin
          failures++;
          $display("FAIL step %0d: %h/%h/%b%b expect %h/%h", s, wr.addr, wr.data, wr.fud_after, wr.last, ea, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
