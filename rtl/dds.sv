// dds: direct digital synthesiser producing the local-oscillator sine for the
// down-converter.
//
// A 32-bit phase accumulator advances by the frequency control word fcw_i on
// every enabled cycle, so f_out = fcw * fs / 2^32 with a resolution of
// 192 MHz / 2^32 = 0.045 Hz. The top LUT_PW = 17 phase bits address a
// quarter-wave sine table of 2^15 words (two bits pick the quadrant and mirror
// / negate), giving a 16-bit signed sine. The table holds
// round(32767 * sin(2*pi*(i + 0.5) / 2^17)); the half-step offset makes the
// mirrored quadrants exact. The worst phase-truncation spur of a P-bit phase
// lies about 6.02*P - 3.9 dB below the carrier: 92.4 dB for 16 bits, which
// misses the 95 dB spurious-free dynamic range asked for, and 98.4 dB for the
// 17 bits used here. The word widths, the resolution and the 95 dB target
// follow the description; the quarter-wave table and the phase truncation are
// this design's choices.
//
// Timing: en_i marks a sample slot. The sine for the phase before the update
// is registered on sin_o, with vld_o, at the second clock edge after the one
// that accepts en_i (DDS_LAT = 2). The phase starts at 0 after reset and stays
// continuous across frequency changes.
module dds
  import ddc_pkg::*;
#(
  parameter int PW     = PHASE_W,  // accumulator width
  parameter int LUT_PW = 17,       // phase bits kept after truncation
  parameter int OW     = SIN_W     // sine width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en_i,
  input  logic [PW-1:0]        fcw_i,
  output logic signed [OW-1:0] sin_o,
  output logic                 vld_o
);

  localparam int AW  = LUT_PW - 2;          // quarter-table address width
  localparam int AMP = (1 << (OW - 1)) - 1; // peak value

  logic [OW-2:0] qtab [1 << AW];

  initial begin
    for (int i = 0; i < (1 << AW); i++)
      qtab[i] = (OW-1)'($rtoi($floor(AMP * $sin(2.0 * 3.14159265358979323846 * (i + 0.5)
                                                / (2.0 ** LUT_PW)) + 0.5)));
  end

  logic [PW-1:0]     acc;
  logic [LUT_PW-1:0] ph0;
  logic              v0, v1, neg1;
  logic [OW-2:0]     mag1;
  logic [AW-1:0]     addr0;

  // Quadrant 1 and 3 read the table backwards.
  always_comb addr0 = ph0[LUT_PW-2] ? ~ph0[AW-1:0] : ph0[AW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      ph0   <= '0;
      v0    <= 1'b0;
      v1    <= 1'b0;
      neg1  <= 1'b0;
      mag1  <= '0;
      sin_o <= '0;
      vld_o <= 1'b0;
    end else begin
      v0 <= en_i;
      if (en_i) begin
        acc <= acc + fcw_i;
        ph0 <= acc[PW-1 -: LUT_PW];
      end
      v1    <= v0;
      mag1  <= qtab[addr0];
      neg1  <= ph0[LUT_PW-1];
      vld_o <= v1;
      sin_o <= neg1 ? -$signed({1'b0, mag1}) : $signed({1'b0, mag1});
    end
  end

endmodule
