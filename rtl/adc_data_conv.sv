// adc_data_conv: turns the 14-bit sample of the modulating signal into a
// frequency offset, as an FTW, by the split-and-add method.
//
// The sample is cut into seven 2-bit slices. Slice k (bits 2k+1:2k) indexes a
// table of four 32-bit words, v * 2^(2k) * (dev / 2^14) * (2^32 / f_clk) for
// v = 0..3, and the seven words are added in a tree of adders. There is one
// table set per FM deviation (8, 15, 30 and 100 kHz), chosen by 'dev_sel'. The
// slicing, the table formula, the four deviations and the adder tree follow the
// document; each table word is rounded to the nearest integer, and the tables
// are computed at elaboration rather than loaded. A full-scale sample gives an
// offset of 'dev', so 'dev' is the peak-to-peak swing; the sample is read as an
// unsigned (offset binary) number.
//
// Timing: 'delta_ftw' is registered, one clock after 'adc_data'.
module adc_data_conv import ddfs_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [13:0] adc_data,
  input  logic [1:0]  dev_sel,
  output logic [31:0] delta_ftw
);
  localparam int unsigned SLICES = 7;

  // the table words, fixed at elaboration
  logic [31:0] tab [N_DEV][SLICES][4];
  for (genvar d = 0; d < N_DEV; d++) begin : g_dev
    for (genvar k = 0; k < SLICES; k++) begin : g_slice
      for (genvar v = 0; v < 4; v++) begin : g_val
        localparam logic [31:0] WORD = dev_ftw(d, 64'(v) << (2 * k));
        assign tab[d][k][v] = WORD;
      end
    end
  end

  logic [31:0] part [SLICES];
  logic [31:0] sum01, sum23, sum45, sum0123, sum456, total;

  always_comb begin
    for (int k = 0; k < SLICES; k++)
      part[k] = tab[dev_sel][k][adc_data[2*k +: 2]];
    sum01   = part[0] + part[1];
    sum23   = part[2] + part[3];
    sum45   = part[4] + part[5];
    sum0123 = sum01 + sum23;
    sum456  = sum45 + part[6];
    total   = sum0123 + sum456;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) delta_ftw <= '0;
    else        delta_ftw <= total;
  end
endmodule
