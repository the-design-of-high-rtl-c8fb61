// tb_hb_cascade: drives the five-stage half-band decimator at the CIC output
// rate (one sample every 25 clocks, as in the receiver) with random data and
// checks every output against a software model of the five stages built
// here (convolution, rounding, saturation per stage). Checks the 32:1 rate
// and the pipeline latency of one clock per stage.
module tb_hb_cascade;
  import ddc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic vld = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [15:0] y;
  logic vo, sat;
  int checks = 0, failures = 0, n_out = 0;

  hb_cascade dut (.clk, .rst, .vld_i(vld), .x_i(x), .y_o(y), .vld_o(vo), .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Software model.
  int hist [5][$];
  int cnt [5];
  int expq [$];
  int exp_cycle [$];
  int cycle = 0;

  function automatic int coef(input int s, input int k);
    return (s < 4) ? HB7_COEF[k] : HB11_COEF[k];
  endfunction

  // Pushes one sample into stage s; returns 1 and the stage output when the
  // stage produces one.
  function automatic bit stage(input int s, input int v, output int o);
    longint a = 0;
    int taps = (s < 4) ? HB7_TAPS : HB11_TAPS;
    int sh = (s < 4) ? HB7_SHIFT : HB11_SHIFT;
    hist[s].push_back(v);
    if (hist[s].size() > taps) void'(hist[s].pop_front());
    cnt[s]++;
    if (cnt[s] % 2 != 0) return 0;
    for (int k = 0; k < taps && k < hist[s].size(); k++)
      a += longint'(coef(s, k)) * longint'(hist[s][hist[s].size() - 1 - k]);
    a = (a + (longint'(1) << (sh - 1))) >>> sh;
    if (a > 32767) a = 32767;
    if (a < -32768) a = -32768;
    o = int'(a);
    return 1;
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (!rst && vld) begin
      int v, o;
      bit go;
      v = int'(x);
      go = 1'b1;
      for (int s = 0; s < 5 && go; s++) begin
        go = stage(s, v, o);
        v = o;
      end
      if (go) begin
        expq.push_back(v);
        exp_cycle.push_back(cycle);
      end
    end
    if (!rst && vo) begin
      int e, c;
      n_out++;
      checks += 2;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        c = exp_cycle.pop_front();
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d expected %0d", y, e);
        end
        // Each stage registers its output at the edge that accepts its input.
        if (cycle - c != 5) begin
          failures++;
          $display("FAIL latency %0d", cycle - c);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 32 * 1500; i++) begin
      x   <= (i < 32 * 1000) ? 16'($urandom_range(0, 65535))
                             : 16'(12000.0 * $sin(real'(i) * 0.003));
      vld <= 1'b1;
      @(posedge clk);
      vld <= 1'b0;
      repeat (24) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != 1500 || expq.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, 32 * 1500);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
