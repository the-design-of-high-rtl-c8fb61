// mixer: the down-converter's multiplier. Multiplies each 12-bit ADC sample by
// the 16-bit DDS sine, shifting the selected channel to baseband (0 Hz), as
// in the description's block diagram.
//
// The 28-bit signed product is scaled by 2^-11 (bits [26:11]) to the 16-bit
// word the CIC filter takes in, and saturated; only -2048 * -32768 can
// exceed that range. Scaling and saturation are this design's choices.
//
// Timing: both inputs must be valid in the same cycle (vld_i); the product
// appears one clock later with vld_o.
module mixer
  import ddc_pkg::*;
#(
  parameter int AW = ADC_W,
  parameter int BW = SIN_W,
  parameter int OW = DATA_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 vld_i,
  input  logic signed [AW-1:0] a_i,     // ADC sample
  input  logic signed [BW-1:0] b_i,     // local oscillator
  output logic signed [OW-1:0] p_o,
  output logic                 vld_o
);

  localparam int SH = AW + BW - 1 - OW;   // 11 for 12 x 16 -> 16

  logic signed [AW+BW-1:0] prod;
  logic signed [AW+BW-1:0] scaled;

  always_comb begin
    prod   = a_i * b_i;
    scaled = prod >>> SH;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p_o   <= '0;
      vld_o <= 1'b0;
    end else begin
      vld_o <= vld_i;
      if (vld_i) p_o <= sat16(64'(scaled));
    end
  end

endmodule
