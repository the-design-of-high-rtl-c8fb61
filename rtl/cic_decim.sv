// cic_decim: cascaded integrator-comb decimator, the first decimation stage
// of the down-converter (192 MS/s -> 7.68 MS/s).
//
// N = 3 integrators run at the input rate, a modulo-R counter keeps every
// R = 25th integrator output, and N = 3 combs with differential delay M = 1
// run at the output rate. The transfer function is
// ((1 - z^-R) / (1 - z^-1))^N with DC gain R^N = 15625. All registers are
// W = 30 bits wide, as required by Bmax = N*log2(R*M) + Bin for a 16-bit
// input; two's-complement wrap-around in the integrators is harmless because
// the comb output always fits. The output keeps bits [SHIFT+15:SHIFT] of the
// comb result and saturates to 16 bits; sat_o flags each clipped sample.
// The filter orders, the delay, the decimation factor and the 16-bit input
// are from the description; the register width follows its formula
// (29 bits in its text, 30 from the formula: see the design notes); the
// output shift is this design's choice.
//
// Timing: integrators add the new sample in the cycle vld_i is high (an
// integrator chain without pipeline delay). On the R-th accepted sample after
// reset, and every R samples after it, the combs run and y_o / vld_o appear
// on the next clock. The output is the sum over the last 3*(R-1)+1 = 73 input
// samples weighted by the CIC impulse response.
module cic_decim
  import ddc_pkg::*;
#(
  parameter int N     = CIC_N,
  parameter int R     = CIC_R,
  parameter int M     = CIC_M,   // differential delay; this build supports 1
  parameter int W     = CIC_W,
  parameter int IW    = DATA_W,
  parameter int SHIFT = CIC_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 vld_i,
  input  logic signed [IW-1:0] x_i,
  output logic signed [15:0]   y_o,
  output logic                 vld_o,
  output logic                 sat_o
);

  localparam int CNT_W = $clog2(R);

  if (M != 1) begin : g_bad_m
    $error("cic_decim: only differential delay M = 1 is built");
  end

  logic signed [W-1:0] integ   [N];
  logic signed [W-1:0] integ_n [N];
  logic signed [W-1:0] dly     [N];   // comb delay lines (M = 1)
  logic signed [W-1:0] comb_n  [N+1];
  logic [CNT_W-1:0]    cnt;
  logic                dump;
  logic signed [W-1:0] scaled;

  always_comb begin
    integ_n[0] = integ[0] + W'(x_i);
    for (int i = 1; i < N; i++) integ_n[i] = integ[i] + integ_n[i-1];
    comb_n[0] = integ_n[N-1];
    for (int i = 0; i < N; i++) comb_n[i+1] = comb_n[i] - dly[i];
    dump   = vld_i && (cnt == CNT_W'(R - 1));
    scaled = comb_n[N] >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin
        integ[i] <= '0;
        dly[i]   <= '0;
      end
      cnt   <= '0;
      y_o   <= '0;
      vld_o <= 1'b0;
      sat_o <= 1'b0;
    end else begin
      vld_o <= dump;
      sat_o <= dump && ovf16(64'(scaled));
      if (vld_i) begin
        for (int i = 0; i < N; i++) integ[i] <= integ_n[i];
        cnt <= (cnt == CNT_W'(R - 1)) ? '0 : cnt + 1'b1;
      end
      if (dump) begin
        for (int i = 0; i < N; i++) dly[i] <= comb_n[i];
        y_o <= sat16(64'(scaled));
      end
    end
  end

endmodule
