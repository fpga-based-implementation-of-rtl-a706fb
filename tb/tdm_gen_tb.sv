// tdm_gen_tb: walks tdm_gen's list for one to four TDM frequencies and checks
// every entry: control bytes, then four FTW bytes per profile at 0x0A, 0x10,
// 0x16 and 0x1C with a FUD after each profile and the end flag after the last
// programmed profile.
`timescale 1ns/1ps
module tdm_gen_tb;
  import ddfs_pkg::*;
  logic [STEP_W-1:0] step;
  logic [3:0][31:0] ftw;
  logic [1:0] last;
  dds_wr_t wr;
  int checks = 0, failures = 0;
  int base_addr [4] = '{10, 16, 22, 28};

  tdm_gen dut (.step, .ftw, .last, .wr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      for (int p = 0; p < 4; p++) ftw[p] = $urandom;
      last = 2'(n % 4);
      for (int s = 0; s < 4 + 4 * (int'(last) + 1); s++) begin
        logic [4:0] ea; logic [7:0] ed; logic ef, el;
        int p, b;
        step = STEP_W'(s);
        #1;
        p = (s - 4) / 4; b = (s - 4) % 4;
        if (s < 4) begin
          ea = 5'(s); ed = CFR_SINGLE_TONE[8*s +: 8]; ef = 0; el = 0;
        end else begin
          ea = 5'(base_addr[p] + b); ed = ftw[p][8*b +: 8]; ef = (b == 3); el = (b == 3) && (p == int'(last));
        end
        checks++;
        if (wr.addr !== ea || wr.data !== ed || wr.fud_after !== ef || wr.last !== el) begin
          failures++;
          $display("FAIL last=%0d step %0d: %h/%h/%b%b expect %h/%h/%b%b", last, s, wr.addr, wr.data, wr.fud_after, wr.last, ea, ed, ef, el);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
