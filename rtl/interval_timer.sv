// interval_timer: one of the controller's timers. While 'en' is high it counts
// controller clocks from 0 to period-1 and pulses 'trg' on the last count, so
// 'trg' repeats every 'period' clocks; 'first_half' is high for the first
// period/2 counts and gives a square wave at the trigger rate. The 32-bit period
// register is written through 'we'/'wdata' and resets to RESET_PERIOD. A period
// of 0 stops the triggers. Dropping 'en' clears the count, so the first trigger
// after enabling comes 'period' clocks later. The document gives the three
// timers, their 32-bit registers and their trigger outputs; the counting
// scheme is this design's.
module interval_timer #(
  parameter logic [31:0] RESET_PERIOD = 32'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic        trg,
  output logic        first_half,
  output logic [31:0] period
);
  logic [31:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period <= RESET_PERIOD;
      cnt_q  <= '0;
    end else begin
      if (we) period <= wdata;
      if (!en || period == 0 || cnt_q >= period - 32'd1) cnt_q <= '0;
      else                                               cnt_q <= cnt_q + 32'd1;
    end
  end

  assign trg        = en && (period != 0) && (cnt_q == period - 32'd1);
  assign first_half = en && (period != 0) && (cnt_q < (period >> 1));
endmodule
