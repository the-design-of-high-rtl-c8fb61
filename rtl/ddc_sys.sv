// ddc_sys: FPGA signal path of the wideband receiver. Takes the 12-bit,
// 192 MS/s sample stream delivered by the ADC's JESD204B link, selects one
// of 1800 narrowband channels, shifts it to baseband and decimates it by 800
// to a 16-bit, 240 kS/s stream for the host link.
//
//   chan_i -> chan_rom -> fcw -> dds -> sine --+
//   adc_i  --------------(2-clock delay)-------x-> mixer -> cic_decim (/25)
//          -> hb_cascade (5 x /2) -> fir_shape (112 taps) -> ddc_o
//
// The chain and its rates follow the description; a single real mixing path
// is built, as in its block diagram. Interface and status flags are this
// design's: one clock domain (192 MHz), adc_vld_i marks a valid input sample
// (normally high every clock; gaps pause the whole chain), chan_i is the
// 1-based channel number and may change at any time (the new frequency word
// takes effect two clocks later, with continuous DDS phase). ddc_vld_o pulses
// once per 800 accepted input samples. sat_o pulses when the CIC, a half-band
// stage or the shaping filter clips a sample; bad_chan_o when chan_i is out
// of range (the previous channel is then kept); ovr_o if the shaping filter
// ever had to drop a sample (it cannot at these rates, and an assertion says
// so).
//
// Latency from an ADC sample to the output that it completes: 4 clocks to the
// CIC input (DDS and mixer), 1 in the CIC, 1 per half-band stage and 112 in
// the shaping filter, 122 clocks in all.
module ddc_sys
  import ddc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     adc_vld_i,
  input  logic signed [ADC_W-1:0]  adc_i,
  input  logic [CHAN_W-1:0]        chan_i,
  output logic signed [DATA_W-1:0] ddc_o,
  output logic                     ddc_vld_o,
  output logic                     sat_o,
  output logic                     ovr_o,
  output logic                     bad_chan_o
);

  // The DDS registers its sine two clocks after the edge that accepts a
  // sample slot, and the mixer samples both operands one clock later, so the
  // ADC sample is delayed by three registers to meet its own sine.
  localparam int DDS_LAT = 2;
  localparam int ADC_DLY = DDS_LAT + 1;

  logic [PHASE_W-1:0]       fcw;
  logic signed [SIN_W-1:0]  lo;
  logic                     lo_vld;
  logic signed [ADC_W-1:0]  adc_d [ADC_DLY];
  logic signed [DATA_W-1:0] mix, cic, hb;
  logic                     mix_vld, cic_vld, hb_vld;
  logic                     cic_sat, hb_sat, fir_sat, fir_busy;

  chan_rom u_rom (.clk, .rst, .chan_i, .fcw_o(fcw), .bad_chan_o);

  dds u_dds (.clk, .rst, .en_i(adc_vld_i), .fcw_i(fcw), .sin_o(lo), .vld_o(lo_vld));

  // Delay the ADC samples to meet the sine computed for the same slot.
  always_ff @(posedge clk) begin
    adc_d[0] <= adc_i;
    for (int i = 1; i < ADC_DLY; i++) adc_d[i] <= adc_d[i-1];
  end

  mixer u_mix (.clk, .rst, .vld_i(lo_vld), .a_i(adc_d[ADC_DLY-1]), .b_i(lo),
               .p_o(mix), .vld_o(mix_vld));

  cic_decim u_cic (.clk, .rst, .vld_i(mix_vld), .x_i(mix),
                   .y_o(cic), .vld_o(cic_vld), .sat_o(cic_sat));

  hb_cascade u_hb (.clk, .rst, .vld_i(cic_vld), .x_i(cic),
                   .y_o(hb), .vld_o(hb_vld), .sat_o(hb_sat));

  fir_shape u_fir (.clk, .rst, .vld_i(hb_vld), .x_i(hb),
                   .y_o(ddc_o), .vld_o(ddc_vld_o), .busy_o(fir_busy),
                   .ovr_o, .sat_o(fir_sat));

  assign sat_o = cic_sat | hb_sat | fir_sat;

  // At 800 clocks per output the 112-clock shaping filter is never overrun.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) !(hb_vld && fir_busy))
    else $error("shaping filter overrun");

endmodule
