// tb_cic_decim: feeds random 16-bit samples (with random gaps in vld_i) and
// then full-scale runs, and compares each output with a direct convolution
// computed here: the CIC impulse response is the 3-fold convolution of a
// 25-sample box (73 taps), the result is shifted right by 12 and saturated.
// Checks the decimation rate (one output per 25 inputs, the first on the
// 25th), the one-clock latency and the saturation flag.
module tb_cic_decim;
  import ddc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic vld = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [15:0] y;
  logic vo, sat;
  int checks = 0, failures = 0, n_sat = 0;

  cic_decim dut (.clk, .rst, .vld_i(vld), .x_i(x), .y_o(y), .vld_o(vo), .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [73];
  int     hist [$];    // all accepted inputs, newest last
  int     n_in = 0;
  logic   pend = 1'b0; // an output is due at the next edge
  longint pend_val;

  initial begin
    longint box [25];
    longint t [73];
    foreach (box[i]) box[i] = 1;
    foreach (h[i]) h[i] = 0;
    foreach (t[i]) t[i] = 0;
    for (int i = 0; i < 25; i++) for (int j = 0; j < 25; j++) t[i+j] += 1;
    for (int i = 0; i < 49; i++) for (int j = 0; j < 25; j++) h[i+j] += t[i] * box[j];
  end

  always @(posedge clk) begin
    // Output check: one clock after the input that completes a block.
    if (!rst) begin
      if (pend) begin
        longint s;
        logic es;
        s  = pend_val >>> 12;
        es = (s > 32767) || (s < -32768);
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        checks++;
        if (!vo || longint'(y) != s || sat != es) begin
          failures++;
          if (failures < 10) $display("FAIL out: y=%0d vld=%0b sat=%0b expected %0d %0b", y, vo, sat, s, es);
        end
        if (sat) n_sat++;
      end else begin
        checks++;
        if (vo) begin
          failures++;
          $display("FAIL unexpected output");
        end
      end
      pend = 1'b0;
      if (vld) begin
        hist.push_back(int'(x));
        n_in++;
        if (n_in % 25 == 0) begin
          pend = 1'b1;
          pend_val = 0;
          for (int k = 0; k < 73 && k < hist.size(); k++)
            pend_val += h[k] * longint'(hist[hist.size() - 1 - k]);
        end
        if (hist.size() > 80) void'(hist.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 30000; i++) begin
      vld <= ($urandom_range(0, 3) != 0);
      if (i < 15000)      x <= 16'($urandom_range(0, 65535));
      else if (i < 20000) x <= 16'sh7FFF;                       // full scale: clips
      else if (i < 25000) x <= 16'sh8000;
      else                x <= 16'($urandom_range(0, 4000)) - 16'sd2000;
      @(posedge clk);
    end
    vld <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never happened");
    end
    $display("outputs with saturation: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
