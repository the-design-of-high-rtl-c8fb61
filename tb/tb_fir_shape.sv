// tb_fir_shape: feeds the serial 112-tap shaping filter with random samples
// and with full-scale samples whose signs follow the coefficient signs (to
// force clipping), and compares each output with a direct convolution
// computed here. Checks the 112-clock latency, that a sample sent while the
// filter is busy is dropped and flagged on ovr_o, and the saturation flag.
module tb_fir_shape;
  import ddc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic vld = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [15:0] y;
  logic vo, busy, ovr, sat;
  int checks = 0, failures = 0, n_ovr = 0, n_sat = 0, n_out = 0;

  fir_shape dut (.clk, .rst, .vld_i(vld), .x_i(x), .y_o(y), .vld_o(vo),
                 .busy_o(busy), .ovr_o(ovr), .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  c [SHAPE_TAPS];
  int  hist [$];
  longint expq [$];
  int  exp_cycle [$];
  int  cycle = 0;
  logic exp_ovr = 1'b0;
  logic busy_model = 1'b0;
  int   busy_until = 0;

  initial for (int k = 0; k < SHAPE_TAPS; k++)
    c[k] = (k < SHAPE_TAPS / 2) ? SHAPE_HALF[k] : SHAPE_HALF[SHAPE_TAPS - 1 - k];

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      checks++;
      if (ovr != exp_ovr) begin
        failures++;
        $display("FAIL ovr=%0b expected %0b", ovr, exp_ovr);
      end
      if (ovr) n_ovr++;
      exp_ovr = 1'b0;
      if (vo) begin
        longint e;
        int ec;
        logic es;
        n_out++;
        checks++;
        e  = expq.pop_front();
        ec = exp_cycle.pop_front();
        es = (e > 32767) || (e < -32768);
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        if (longint'(y) != e || sat != es || cycle - ec != 113) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d sat=%0b after %0d, expected %0d %0b after 113",
                                      y, sat, cycle - ec, e, es);
        end
        if (sat) n_sat++;
      end
      busy_model = (cycle <= busy_until);
      if (vld) begin
        if (busy_model) exp_ovr = 1'b1;
        else begin
          longint a;
          a = 0;
          hist.push_back(int'(x));
          if (hist.size() > SHAPE_TAPS) void'(hist.pop_front());
          for (int k = 0; k < hist.size(); k++)
            a += longint'(c[k]) * longint'(hist[hist.size() - 1 - k]);
          expq.push_back((a + (longint'(1) << (SHAPE_SHIFT - 1))) >>> SHAPE_SHIFT);
          exp_cycle.push_back(cycle);
          busy_until = cycle + 112;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 3000; i++) begin
      if (i < 2000)
        x <= 16'($urandom_range(0, 65535));
      else
        // Signs of x[n-k] follow c[k] for the newest sample at index i.
        x <= (c[(2999 - i) % SHAPE_TAPS] >= 0) ? 16'sh7FFF : 16'sh8000;
      vld <= 1'b1;
      @(posedge clk);
      vld <= 1'b0;
      if (i % 50 == 7) begin
        // A sample during the pass: must be dropped.
        repeat (int'($urandom_range(5, 100))) @(posedge clk);
        x <= 16'sh1234;
        vld <= 1'b1;
        @(posedge clk);
        vld <= 1'b0;
      end
      repeat (int'($urandom_range(115, 200))) @(posedge clk);
    end
    repeat (300) @(posedge clk);
    checks += 3;
    if (n_out != 3000) begin
      failures++;
      $display("FAIL %0d outputs", n_out);
    end
    if (n_ovr == 0) begin
      failures++;
      $display("FAIL no overrun seen");
    end
    if (n_sat == 0) begin
      failures++;
      $display("FAIL no saturation seen");
    end
    $display("outputs %0d, overruns %0d, saturated %0d", n_out, n_ovr, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
