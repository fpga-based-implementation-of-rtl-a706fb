// ad9858_model: behavioural model (not synthesizable) of the parallel register
// port of an AD9858-class DDS, for the testbenches. A byte is written into the
// I/O buffer at the rising edge of the active-low write strobe; a rising edge of
// FUD copies the buffer into the active registers. The model counts writes and
// FUDs and checks that address and data are stable for at least MIN_SETUP_NS
// before the strobe falls and MIN_HOLD_NS after it rises. Checking starts when
// the master reset line is released for the first time.
`timescale 1ns/1ps
module ad9858_model import ddfs_pkg::*; #(
  parameter realtime MIN_SETUP_NS = 10,
  parameter realtime MIN_HOLD_NS  = 10
) (
  input dds_ctrl_t ctrl,
  input dds_bus_t  bus
);
  logic [7:0] io_buf [64];
  logic [7:0] act    [64];
  int         writes = 0, fuds = 0, timing_errors = 0;
  realtime    t_bus = 0, t_wr_rise = -1000;
  bit         armed = 0;

  always @(negedge ctrl.reset) armed = 1;

  initial for (int i = 0; i < 64; i++) begin io_buf[i] = 0; act[i] = 0; end

  always @(bus) if (armed) begin
    t_bus = $realtime;
    if (ctrl.wr_n && $realtime - t_wr_rise < MIN_HOLD_NS) begin timing_errors++; $display("DDS model: hold violation at %t", $realtime); end
    if (!ctrl.wr_n) begin timing_errors++; $display("DDS model: bus changed during write strobe at %t", $realtime); end
  end

  always @(negedge ctrl.wr_n) if (armed && $realtime - t_bus < MIN_SETUP_NS) begin timing_errors++; $display("DDS model: setup violation at %t", $realtime); end

  always @(posedge ctrl.wr_n) begin
    io_buf[bus.addr] = bus.data;
    writes++;
    t_wr_rise = $realtime;
  end

  always @(posedge ctrl.fud) begin
    act = io_buf;
    fuds++;
  end

  function automatic logic [31:0] word(input int addr, input int nbytes);
    logic [31:0] w = 0;
    for (int i = 0; i < nbytes; i++) w[8*i +: 8] = act[addr + i];
    return w;
  endfunction

  function automatic logic [31:0] profile_ftw(input int p);
    int a [4] = '{10, 16, 22, 28};
    return word(a[p], 4);
  endfunction
endmodule
