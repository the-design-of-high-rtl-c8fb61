// tb_ddc_sys: end-to-end test of the receiver signal path at its full size
// (1800 channels, 192 MHz, decimation 800, 112-tap shaping filter).
//
// A cosine is synthesised here at a channel's centre frequency plus an
// offset and fed in as 12-bit ADC samples. Phases:
//   A  channel 693 selected, tone 5 kHz above it: the output must be a
//      5 kHz tone whose RMS matches the chain gain computed here
//      (A * 32767/2048 * 1/2 * 25^3/2^12), within 3 %.
//   B  channel 693 selected, tone in channel 700: the output must stay below
//      0.5 % of the in-channel level (channel rejection).
//   C  switch to channel 700 (input gaps: adc_vld_i low 20 % of the time):
//      the tone must come back at full level.
//   D  a strong tone in channel 700: the CIC output must clip (sat_o).
//   E  an out-of-range channel number: bad_chan_o, channel kept.
// Every output must come exactly 800 accepted inputs after the previous one.
// Each mechanism (pass band, rejection, channel switch, input gaps,
// saturation, bad channel) is counted and must happen at least once.
module tb_ddc_sys;
  import ddc_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam real FS = 192.0e6;

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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real chan_freq(input int c);
    return real'(64'h4D52316D + longint'(c - 1) * 64'h75F70) * FS / 4294967296.0;
  endfunction

  // Stimulus state.
  real  f_in = 0.0, amp = 0.0, ph = 0.0;
  real  gap_prob = 0.0;
  int   n_valid = 0, last_valid = 0, n_out = 0;
  int   n_gaps = 0, n_sat = 0, n_bad = 0, n_rate_err = 0;
  // Measurement over a window of outputs.
  real  sumsq = 0.0;
  int   nsamp = 0, ncross = 0, measuring = 0;
  logic signed [15:0] prev = '0;
  logic gappy = 1'b0, gap_prev = 1'b0;  // gaps since the last / previous output

  always @(posedge clk) begin
    if (!rst) begin
      if (sat) n_sat++;
      if (bad) n_bad++;
      if (ovr) begin
        failures++;
        $display("FAIL shaping filter overrun");
      end
      if (dvld) begin
        n_out++;
        // The pipeline latency is fixed in clocks, so with input gaps the
        // count of accepted inputs between outputs only averages 800.
        if (n_out > 2 && !gappy && n_valid - last_valid != 800) n_rate_err++;
        if (n_out > 2 && gappy && (n_valid - last_valid < 700 || n_valid - last_valid > 900)) n_rate_err++;
        gappy = gap_prev;
        gap_prev = 1'b0;
        last_valid = n_valid;
        if (measuring != 0) begin
          sumsq += real'(dout) * real'(dout);
          if ((dout >= 0) != (prev >= 0)) ncross++;
          nsamp++;
        end
        prev = dout;
      end
      if (adc_vld) n_valid++;
    end
    // Next input sample.
    if ($urandom_range(0, 999) < int'(gap_prob * 1000.0)) begin
      adc_vld <= 1'b0;
      n_gaps++;
      gap_prev = 1'b1;
      gappy = 1'b1;
    end else begin
      adc_vld <= 1'b1;
      adc <= 12'($rtoi($floor(amp * $cos(2.0 * PI * ph) + 0.5)));
      ph = ph + f_in / FS;
      if (ph >= 1.0) ph = ph - 1.0;
    end
  end

  task automatic run_outputs(input int skip, input int meas);
    int target;
    target = n_out + skip;
    wait (n_out >= target);
    sumsq = 0.0; nsamp = 0; ncross = 0; measuring = 1;
    target = n_out + meas;
    wait (n_out >= target);
    measuring = 0;
  endtask

  function automatic real rms();
    return (nsamp > 0) ? $sqrt(sumsq / real'(nsamp)) : 0.0;
  endfunction

  initial begin
    real expect_rms, r;
    int  sat_before;
    int  mech_pass = 0, mech_reject = 0, mech_switch = 0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;

    // A: in-channel tone.
    amp = 300.0;
    f_in = chan_freq(693) + 5.0e3;
    expect_rms = amp * (32767.0 / 2048.0) * 0.5 * (15625.0 / 4096.0) / $sqrt(2.0);
    run_outputs(150, 240);
    r = rms();
    checks += 2;
    $display("A: rms %f expected %f, zero crossings %0d in %0d samples", r, expect_rms, ncross, nsamp);
    if (r < 0.97 * expect_rms || r > 1.03 * expect_rms) begin
      failures++;
      $display("FAIL A level");
    end else mech_pass++;
    // 5 kHz at 240 kS/s: 10 crossings per 240 samples.
    if (ncross < 9 || ncross > 11) begin
      failures++;
      $display("FAIL A frequency");
    end

    // B: tone in another channel.
    f_in = chan_freq(700) + 5.0e3;
    run_outputs(150, 240);
    r = rms();
    checks++;
    $display("B: rms %f (limit %f)", r, 0.005 * expect_rms);
    if (r > 0.005 * expect_rms) begin
      failures++;
      $display("FAIL B rejection");
    end else mech_reject++;

    // C: switch channel, with gaps in the input.
    chan = 11'd700;
    gap_prob = 0.2;
    run_outputs(150, 240);
    r = rms();
    checks++;
    $display("C: rms %f expected %f", r, expect_rms);
    if (r < 0.97 * expect_rms || r > 1.03 * expect_rms) begin
      failures++;
      $display("FAIL C level after channel switch");
    end else mech_switch++;
    gap_prob = 0.0;

    // D: strong tone, clipping.
    sat_before = n_sat;
    amp = 2000.0;
    run_outputs(20, 20);
    checks++;
    $display("D: saturated samples %0d, rms %f", n_sat - sat_before, rms());
    if (n_sat == sat_before) begin
      failures++;
      $display("FAIL D no saturation");
    end

    // E: bad channel number.
    amp = 300.0;
    chan = 11'd0;
    repeat (10) @(posedge clk);
    chan = 11'd700;
    run_outputs(150, 240);
    r = rms();
    checks += 2;
    if (n_bad == 0) begin
      failures++;
      $display("FAIL E bad channel not flagged");
    end
    if (r < 0.97 * expect_rms || r > 1.03 * expect_rms) begin
      failures++;
      $display("FAIL E level %f", r);
    end

    // Overall rate: one output per 800 accepted inputs (122-clock latency).
    checks++;
    if (n_out != (n_valid - 122) / 800 && n_out != (n_valid - 122) / 800 + 1) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, n_valid);
    end
    checks += 7;
    if (n_rate_err != 0) begin failures++; $display("FAIL %0d outputs off the 800:1 rate", n_rate_err); end
    if (mech_pass == 0)   begin failures++; $display("FAIL pass band never shown"); end
    if (mech_reject == 0) begin failures++; $display("FAIL rejection never shown"); end
    if (mech_switch == 0) begin failures++; $display("FAIL channel switch never shown"); end
    if (n_gaps == 0)      begin failures++; $display("FAIL no input gaps"); end
    if (n_sat == 0)       begin failures++; $display("FAIL no saturation"); end
    if (n_bad == 0)       begin failures++; $display("FAIL no bad channel"); end
    $display("mechanisms: pass %0d reject %0d switch %0d gaps %0d saturation %0d bad_chan %0d, outputs %0d",
             mech_pass, mech_reject, mech_switch, n_gaps, n_sat, n_bad, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
