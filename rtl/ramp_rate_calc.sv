// ramp_rate_calc: works out how often the chirp must be restarted.
//
// In chirp mode the DDS adds the step word DFTW to its frequency once every
// (RRW + 1) ramp-clock periods, the ramp clock being f_clk / SYNC_DIV. A sweep
// from the start FTW to the stop FTW therefore lasts
//   T = ceil(|stop - start| / DFTW) * (RRW + 1) * SYNC_DIV / f_clk,
// and the controller restarts it every T. This block returns T in controller
// clocks, computed as one rounded-up division
//   period = ceil(|stop - start| * (RRW + 1) * NUM_K / (DFTW * DEN_K)),
// NUM_K = SYNC_DIV * f_fpga / 1 MHz and DEN_K = f_clk / 1 MHz, with a 64-step
// restoring divider. The document names the block and feeds its result to the
// chirp timer; the formula and the divider are this design's. A zero step word
// gives period 0, which leaves the chirp timer stopped.
//
// Timing: 'start' samples the inputs; 'valid' pulses with 'period' 67 clocks
// later. 'busy' is high meanwhile.
module ramp_rate_calc import ddfs_pkg::*; #(
  parameter int unsigned NUM_K = DDS_SYNC_DIV * int'(FPGA_CLK_HZ / 64'd1_000_000),
  parameter int unsigned DEN_K = int'(DDS_CLK_HZ / 64'd1_000_000)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] ftw_start,
  input  logic [31:0] ftw_stop,
  input  logic [31:0] dftw,
  input  logic [15:0] rrw,
  output logic        busy,
  output logic        valid,
  output logic [31:0] period
);
  typedef enum logic [1:0] {R_IDLE, R_PREP, R_DIV, R_DONE} rstate_e;
  rstate_e     state;
  logic [63:0] num_q, den_q, quo_q;
  logic [64:0] rem_q, rem_sh;
  logic [6:0]  cnt_q;
  logic [31:0] span;

  assign span   = (ftw_stop >= ftw_start) ? ftw_stop - ftw_start : ftw_start - ftw_stop;
  assign rem_sh = {rem_q[63:0], num_q[63]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= R_IDLE;
      num_q  <= '0;
      den_q  <= '0;
      quo_q  <= '0;
      rem_q  <= '0;
      cnt_q  <= '0;
      period <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      case (state)
        R_IDLE: if (start) begin
          num_q <= 64'(span) * 64'({1'b0, rrw} + 17'd1) * 64'(NUM_K);
          den_q <= 64'(dftw) * 64'(DEN_K);
          state <= R_PREP;
        end
        R_PREP: begin
          // ceil(a/b) = floor((a + b - 1) / b)
          num_q <= num_q + den_q - 64'd1;
          rem_q <= '0;
          quo_q <= '0;
          cnt_q <= 7'd64;
          state <= (den_q == 0) ? R_DONE : R_DIV;
        end
        R_DIV: begin
          if (rem_sh >= {1'b0, den_q}) begin
            rem_q <= rem_sh - {1'b0, den_q};
            quo_q <= {quo_q[62:0], 1'b1};
          end else begin
            rem_q <= rem_sh;
            quo_q <= {quo_q[62:0], 1'b0};
          end
          num_q <= {num_q[62:0], 1'b0};
          cnt_q <= cnt_q - 7'd1;
          if (cnt_q == 7'd1) state <= R_DONE;
        end
        default: begin  // R_DONE
          period <= (den_q == 0) ? 32'd0
                  : (quo_q[63:32] != 0) ? 32'hFFFF_FFFF : quo_q[31:0];
          valid  <= 1'b1;
          state  <= R_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != R_IDLE);
endmodule
