// tb_dds_sfdr: measures the spurious-free dynamic range of the DDS.
//
// The DDS runs for N = 2^18 samples at frequency words fcw = m * 2^32 / N,
// so the tone falls exactly on FFT bin m and no window is needed. With
// N = 2^18 the phase visits every 2^-18 of a turn, so the truncation of the
// phase to the table's 17 bits shows up fully in the spectrum. A radix-2
// FFT computed here gives the spectrum; SFDR is the carrier bin against the
// largest other bin (DC included). The requirement is at least 95 dB.
// Odd m leaves a phase remainder of half a 17-bit step (the worst case for
// the 17-bit table); m = 80002 leaves half a 16-bit step, the worst case of
// a 16-bit table, which would measure 92.4 dB.
module tb_dds_sfdr;
  import ddc_pkg::*;

  localparam real PI   = 3.14159265358979323846;
  localparam int  LOGN = 18;
  localparam int  N    = 1 << LOGN;

  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0;
  logic [31:0] fcw = '0;
  logic signed [15:0] s;
  logic vld;
  int checks = 0, failures = 0;

  dds dut (.clk, .rst, .en_i(en), .fcw_i(fcw), .sin_o(s), .vld_o(vld));

  always #5 clk = ~clk;

  initial begin
    repeat (4 * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real re [N];
  real im [N];
  real tw_re [N/2];
  real tw_im [N/2];
  int  n_got = 0;

  always @(posedge clk) if (!rst && vld && n_got < N) begin
    re[n_got] = real'(s);
    im[n_got] = 0.0;
    n_got++;
  end

  function automatic int bitrev(input int v);
    int r = 0;
    for (int b = 0; b < LOGN; b++) r |= ((v >> b) & 1) << (LOGN - 1 - b);
    return r;
  endfunction

  task automatic fft();
    for (int i = 0; i < N; i++) begin
      int j = bitrev(i);
      if (j > i) begin
        real t;
        t = re[i]; re[i] = re[j]; re[j] = t;
        t = im[i]; im[i] = im[j]; im[j] = t;
      end
    end
    for (int len = 2; len <= N; len <<= 1) begin
      int half = len / 2;
      int step = N / len;
      for (int i = 0; i < N; i += len)
        for (int k = 0; k < half; k++) begin
          real wr, wi, xr, xi;
          wr = tw_re[k * step];
          wi = tw_im[k * step];
          xr = re[i + k + half] * wr - im[i + k + half] * wi;
          xi = re[i + k + half] * wi + im[i + k + half] * wr;
          re[i + k + half] = re[i + k] - xr;
          im[i + k + half] = im[i + k] - xi;
          re[i + k] = re[i + k] + xr;
          im[i + k] = im[i + k] + xi;
        end
    end
  endtask

  initial begin
    int tone_bin [3];
    tone_bin = '{12345, 80002, 77777};
    for (int k = 0; k < N / 2; k++) begin
      tw_re[k] = $cos(2.0 * PI * real'(k) / real'(N));
      tw_im[k] = -$sin(2.0 * PI * real'(k) / real'(N));
    end
    foreach (tone_bin[b]) begin
      real carrier, spur, mag, sfdr;
      int  spur_bin;
      rst <= 1'b1;
      en  <= 1'b0;
      fcw <= 32'(longint'(tone_bin[b]) * (64'h1_0000_0000 / N));
      repeat (3) @(posedge clk);
      n_got = 0;
      rst <= 1'b0;
      en  <= 1'b1;
      wait (n_got == N);
      en <= 1'b0;
      @(posedge clk);
      fft();
      carrier = $sqrt(re[tone_bin[b]] ** 2 + im[tone_bin[b]] ** 2);
      spur = 0.0;
      spur_bin = 0;
      for (int k = 0; k < N; k++) if (k != tone_bin[b] && k != N - tone_bin[b]) begin
        mag = $sqrt(re[k] ** 2 + im[k] ** 2);
        if (mag > spur) begin spur = mag; spur_bin = k; end
      end
      sfdr = 20.0 * $log10(carrier / spur);
      $display("bin %0d: SFDR %f dB (largest spur at bin %0d)", tone_bin[b], sfdr, spur_bin);
      checks++;
      if (sfdr < 95.0) begin
        failures++;
        $display("FAIL SFDR below 95 dB");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
