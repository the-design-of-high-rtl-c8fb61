// tb_bpsk: the receiver's reference test signal. A BPSK carrier in channel
// 693, 16 ksymbol/s, sending the pattern 10010010 over and over, is fed to
// ddc_sys at its full size. The carrier is synthesised with the same phase
// increment as the channel's frequency word and starts in phase with the
// local oscillator, so the real mixer returns the symbols at baseband
// (+1 for a 1, -1 for a 0) at 240 kS/s, 15 samples per symbol.
// Symbols are rectangular (no pulse shaping); the 24 kHz shaping filter
// smooths them. The test finds the symbol timing by searching all offsets
// of one pattern period for the largest correlation, then requires every symbol
// after the first 8 to be decided correctly at its centre, and the eye
// opening to be at least half the expected level.
module tb_bpsk;
  import ddc_pkg::*;

  localparam real PI       = 3.14159265358979323846;
  localparam int  SPS_CLK  = 12000;   // 192 MHz / 16 ksym/s
  localparam int  SPS_OUT  = 15;      // 240 kS/s / 16 ksym/s
  localparam int  NSYM     = 64;
  localparam logic [7:0] PATTERN = 8'b1001_0010;   // first symbol is bit 7

  logic clk = 1'b0, rst = 1'b1;
  logic adc_vld = 1'b0;
  logic signed [11:0] adc = '0;
  logic [CHAN_W-1:0] chan = 11'd693;
  logic signed [15:0] dout;
  logic dvld, sat, ovr, bad;
  int checks = 0, failures = 0;

  ddc_sys dut (.clk, .rst, .adc_vld_i(adc_vld), .adc_i(adc), .chan_i(chan),
               .ddc_o(dout), .ddc_vld_o(dvld), .sat_o(sat), .ovr_o(ovr), .bad_chan_o(bad));

  always #5 clk = ~clk;

  initial begin
    repeat (NSYM * SPS_CLK + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int out [$];
  always @(posedge clk) if (!rst && dvld) out.push_back(int'(dout));

  initial begin
    longint fcw;
    longint ph;
    int best_off, best_score, score, n_err, min_eye;
    real amp;
    fcw = 64'h4D52316D + 692 * 64'h75F70;
    amp = 300.0;
    ph  = 0;
    // The DDS phase starts at 0 with the first accepted sample after reset;
    // the ADC stream therefore starts with the first clock after reset too.
    @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < NSYM * SPS_CLK; n++) begin
      int  sym;
      real d;
      sym = n / SPS_CLK;
      d = PATTERN[7 - (sym % 8)] ? 1.0 : -1.0;
      adc_vld <= 1'b1;
      adc <= 12'($rtoi($floor(amp * d * $sin(2.0 * PI * real'(ph) / 4294967296.0) + 0.5)));
      ph = (ph + fcw) % 64'h1_0000_0000;
      @(posedge clk);
    end
    adc_vld <= 1'b0;
    repeat (200) @(posedge clk);

    // Symbol timing: output sample index = s*15 + off.
    best_off = 0; best_score = -2147483647;
    for (int off = 0; off < 8 * SPS_OUT; off++) begin
      score = 0;
      for (int s = 8; s < NSYM - 8; s++)
        if (s * SPS_OUT + off < out.size())
          score += PATTERN[7 - (s % 8)] ? out[s * SPS_OUT + off] : -out[s * SPS_OUT + off];
      if (score > best_score) begin best_score = score; best_off = off; end
    end
    // The offset with the largest correlation is the eye centre.
    n_err = 0; min_eye = 32767;
    for (int s = 8; s < NSYM - 8; s++) begin
      int v;
      v = out[s * SPS_OUT + best_off];
      checks++;
      if ((v > 0) != PATTERN[7 - (s % 8)]) begin
        n_err++;
        failures++;
      end
      if ((v > 0 ? v : -v) < min_eye) min_eye = (v > 0 ? v : -v);
    end
    // Expected level of a long run: amp * 32767/2048 / 2 * 25^3/2^12.
    checks++;
    if (real'(min_eye) < 0.5 * amp * 16.0 * 0.5 * 15625.0 / 4096.0) begin
      failures++;
      $display("FAIL eye opening %0d", min_eye);
    end
    checks++;
    if (sat || ovr) failures++;
    $display("outputs %0d, symbol offset %0d samples, symbol errors %0d, eye %0d",
             out.size(), best_off, n_err, min_eye);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
