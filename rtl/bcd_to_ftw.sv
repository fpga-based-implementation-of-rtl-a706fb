// bcd_to_ftw: converts a frequency given as packed BCD digits into the DDS
// frequency tuning word FTW = floor(f * 2^32 / f_clk).
//
// The digits are first summed into a binary number of frequency units
// (sum of digit_i * 10^i), which is then multiplied by the constant
// K = ceil(2^(32+S) * UNIT_HZ / CLK_HZ) and shifted right by S. With S = 48 the
// product error stays below one part in the spacing of possible fractional
// parts, so the result equals the exact floor for every 8-digit input at the
// default clock. The document gives the block's function and the
// BCD 10000000 -> FTW 19999999 example; the multiply-by-reciprocal method is
// this design's own.
//
// Timing: 'start' samples 'bcd'; 'valid' pulses two clocks later with 'ftw'.
module bcd_to_ftw import ddfs_pkg::*; #(
  parameter int unsigned     DIGITS  = 8,
  parameter longint unsigned UNIT_HZ = FREQ_UNIT_HZ,
  parameter longint unsigned CLK_HZ  = DDS_CLK_HZ
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [4*DIGITS-1:0]   bcd,
  output logic                  valid,
  output logic [31:0]           ftw
);
  localparam int unsigned S = 48;

  function automatic logic [63:0] calc_k();
    logic [127:0] num;
    num = (128'd1 << (32 + S)) * 128'(UNIT_HZ);
    return 64'((num + 128'(CLK_HZ) - 128'd1) / 128'(CLK_HZ));
  endfunction
  localparam logic [63:0] K = calc_k();

  logic [39:0]  bin_q;
  logic [103:0] prod;
  logic [1:0]   vld_q;

  // BCD digits to a binary count of frequency units
  function automatic logic [39:0] bcd_value(input logic [4*DIGITS-1:0] d);
    logic [39:0] acc;
    acc = '0;
    for (int i = DIGITS - 1; i >= 0; i--)
      acc = acc * 40'd10 + 40'(d[4*i +: 4]);
    return acc;
  endfunction

  assign prod = 104'(bin_q) * 104'(K);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_q <= '0;
      ftw   <= '0;
      vld_q <= '0;
    end else begin
      vld_q <= {vld_q[0], start};
      if (start)    bin_q <= bcd_value(bcd);
      if (vld_q[0]) ftw   <= 32'(prod >> S);
    end
  end

  assign valid = vld_q[1];
endmodule
