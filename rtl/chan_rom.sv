// chan_rom: channel-selection ROM. Maps a channel number (1..N_CHAN) to the
// 32-bit DDS frequency control word FCW = f_channel * 2^32 / fs that tunes the
// down-converter to that channel.
//
// The table is a ROM of N_CHAN words at addresses 0..N_CHAN-1, address =
// channel - 1, as in the description. Its contents are filled at elaboration
// from FCW(k) = FCW0 + k * FCW_STEP (a uniform channel grid), which
// reproduces the first two published entries; the grid formula is this
// design's choice. A channel number outside 1..N_CHAN leaves the output
// word unchanged and raises bad_chan_o for that cycle.
//
// Timing: one registered read; fcw_o follows chan_i one clock later.
module chan_rom
  import ddc_pkg::*;
#(
  parameter int                 NCH   = N_CHAN,
  parameter int                 CW    = CHAN_W,
  parameter logic [PHASE_W-1:0] BASE  = FCW0,
  parameter logic [PHASE_W-1:0] STEP  = FCW_STEP
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [CW-1:0]      chan_i,      // channel number, 1-based
  output logic [PHASE_W-1:0] fcw_o,       // frequency control word
  output logic               bad_chan_o   // chan_i outside 1..NCH
);

  logic [PHASE_W-1:0] rom [NCH];

  initial begin
    for (int k = 0; k < NCH; k++) rom[k] = BASE + PHASE_W'(k) * STEP;
  end

  logic          in_range;
  logic [CW-1:0] addr;

  always_comb begin
    in_range = (chan_i >= CW'(1)) && (chan_i <= CW'(NCH));
    addr     = chan_i - CW'(1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fcw_o      <= rom[0];
      bad_chan_o <= 1'b0;
    end else begin
      bad_chan_o <= !in_range;
      if (in_range) fcw_o <= rom[addr];
    end
  end

endmodule
