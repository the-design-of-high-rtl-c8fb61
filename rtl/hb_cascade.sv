// hb_cascade: the multistage half-band decimator, 7.68 MS/s -> 240 kS/s.
//
// Five hb_decim stages in series, each halving the sample rate
// (7.68 -> 3.84 -> 1.92 -> 0.96 -> 0.48 -> 0.24 MS/s). Stages 1 to 4 use the
// 7-tap half-band filter and stage 5 the 11-tap one, whose narrower
// transition band guards the final 24 kHz pass band against aliasing. Every
// stage output is saturated to 16 bits. The stage count, the tap counts and
// the rates are from the description; the coefficients are this design's.
//
// Timing: one valid output per 32 valid inputs; each stage adds one clock.
// sat_o is the OR of the stages' saturation flags.
module hb_cascade
  import ddc_pkg::*;
#(
  parameter int STAGES = HB_STAGES
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               vld_i,
  input  logic signed [15:0] x_i,
  output logic signed [15:0] y_o,
  output logic               vld_o,
  output logic               sat_o
);

  logic signed [15:0] d   [STAGES+1];
  logic               v   [STAGES+1];
  logic [STAGES-1:0]  sat;

  assign d[0] = x_i;
  assign v[0] = vld_i;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    if (s < STAGES - 1) begin : g_hb7
      hb_decim #(.NTAPS(HB7_TAPS), .COEF(HB7_COEF), .SHIFT(HB7_SHIFT)) u_hb (
        .clk, .rst, .vld_i(v[s]), .x_i(d[s]),
        .y_o(d[s+1]), .vld_o(v[s+1]), .sat_o(sat[s]));
    end else begin : g_hb11
      hb_decim #(.NTAPS(HB11_TAPS), .COEF(HB11_COEF), .SHIFT(HB11_SHIFT)) u_hb (
        .clk, .rst, .vld_i(v[s]), .x_i(d[s]),
        .y_o(d[s+1]), .vld_o(v[s+1]), .sat_o(sat[s]));
    end
  end

  assign y_o   = d[STAGES];
  assign vld_o = v[STAGES];
  assign sat_o = |sat;

endmodule
