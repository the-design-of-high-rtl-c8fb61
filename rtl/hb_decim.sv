// hb_decim: one half-band decimate-by-2 FIR stage.
//
// A NTAPS-long shift register holds the latest input samples. Every second
// accepted sample (the 2nd, 4th, ... after reset) the stage forms
// y = sum_k COEF[k] * x[n-k] over the window that includes the new sample,
// rounds it (adds 2^(SHIFT-1)), scales it by 2^-SHIFT and saturates it to
// 16 bits; sat_o flags each clipped output. A half-band filter has every
// other coefficient zero except the centre one, so nearly half of the
// products are constant zero and vanish in synthesis. The 16-bit saturated
// output is from the description; the coefficients (maximally flat
// half-band designs, see ddc_pkg) are this design's choice.
//
// Timing: y_o / vld_o appear one clock after the vld_i that completes a pair.
module hb_decim
  import ddc_pkg::*;
#(
  parameter int NTAPS        = HB7_TAPS,
  parameter int COEF [NTAPS] = HB7_COEF,
  parameter int SHIFT        = HB7_SHIFT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                vld_i,
  input  logic signed [15:0]  x_i,
  output logic signed [15:0]  y_o,
  output logic                vld_o,
  output logic                sat_o
);

  logic signed [15:0] win [NTAPS];   // win[0] is the newest sample
  logic               phase;         // 1: the next sample completes a pair
  logic signed [47:0] acc;
  logic signed [47:0] scaled;

  always_comb begin
    acc = 48'(COEF[0]) * 48'(x_i);
    for (int k = 1; k < NTAPS; k++) acc += 48'(COEF[k]) * 48'(win[k-1]);
    scaled = (acc + (48'sd1 <<< (SHIFT - 1))) >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) win[k] <= '0;
      phase <= 1'b0;
      y_o   <= '0;
      vld_o <= 1'b0;
      sat_o <= 1'b0;
    end else begin
      vld_o <= vld_i && phase;
      sat_o <= vld_i && phase && ovf16(64'(scaled));
      if (vld_i) begin
        win[0] <= x_i;
        for (int k = 1; k < NTAPS; k++) win[k] <= win[k-1];
        phase <= !phase;
        if (phase) y_o <= sat16(64'(scaled));
      end
    end
  end

endmodule
