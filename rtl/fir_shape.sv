// fir_shape: the 112-tap shaping (channel) filter at the 240 kS/s output rate.
//
// Because the clock (192 MHz) is 800 times the sample rate, the filter uses a
// single multiplier and accumulates one tap per clock. Each accepted sample
// is written into a 112-word circular buffer and starts a pass that sums
// COEF[k] * x[n-k] for k = 0..111, walking the buffer backwards from the
// newest sample. The result is rounded, scaled by 2^-17 (the coefficients
// sum to about 2^17, unity DC gain) and saturated to 16 bits. The coefficient
// table stores half of the symmetric response (tap k equals tap 111-k).
// The tap count and the filter specification (pass band 24 kHz, stop band
// from 34 kHz, ripple 0.001 / 0.0002) are from the description; the
// coefficients, the serial architecture and the overrun flag are this
// design's.
//
// Timing: busy_o rises with the clock after an accepted vld_i and y_o/vld_o
// appear NTAPS = 112 clocks after it. A vld_i that arrives while busy_o is
// high is dropped and flagged on ovr_o one clock later.
module fir_shape
  import ddc_pkg::*;
#(
  parameter int NTAPS = SHAPE_TAPS,
  parameter int SHIFT = SHAPE_SHIFT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               vld_i,
  input  logic signed [15:0] x_i,
  output logic signed [15:0] y_o,
  output logic               vld_o,
  output logic               busy_o,
  output logic               ovr_o,
  output logic               sat_o
);

  localparam int AW = $clog2(NTAPS);

  logic signed [15:0] buffer [NTAPS];
  logic [AW-1:0]      wptr, rptr, k;
  logic signed [47:0] acc, acc_n, rounded;
  logic signed [SHAPE_COEF_W-1:0] coef;
  logic [AW-2:0]      hidx;           // index into the stored half

  // Symmetric coefficient lookup.
  always_comb begin
    hidx    = (int'(k) < NTAPS / 2) ? k[AW-2:0] : (AW-1)'(AW'(NTAPS - 1) - k);
    coef    = SHAPE_COEF_W'(SHAPE_HALF[hidx]);
    acc_n   = acc + 48'(coef) * 48'(buffer[rptr]);
    rounded = (acc_n + (48'sd1 <<< (SHIFT - 1))) >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NTAPS; i++) buffer[i] <= '0;
      wptr   <= '0;
      rptr   <= '0;
      k      <= '0;
      acc    <= '0;
      busy_o <= 1'b0;
      y_o    <= '0;
      vld_o  <= 1'b0;
      ovr_o  <= 1'b0;
      sat_o  <= 1'b0;
    end else begin
      vld_o <= 1'b0;
      sat_o <= 1'b0;
      ovr_o <= vld_i && busy_o;
      if (!busy_o) begin
        if (vld_i) begin
          buffer[wptr] <= x_i;
          rptr   <= wptr;
          wptr   <= (wptr == AW'(NTAPS - 1)) ? '0 : wptr + 1'b1;
          k      <= '0;
          acc    <= '0;
          busy_o <= 1'b1;
        end
      end else begin
        acc  <= acc_n;
        k    <= k + 1'b1;
        rptr <= (rptr == '0) ? AW'(NTAPS - 1) : rptr - 1'b1;
        if (k == AW'(NTAPS - 1)) begin
          busy_o <= 1'b0;
          vld_o  <= 1'b1;
          y_o    <= sat16(64'(rounded));
          sat_o  <= ovf16(64'(rounded));
        end
      end
    end
  end

endmodule
