// tb_hb_decim: one 7-tap and one 11-tap half-band stage, driven with random
// samples (random gaps in vld_i) and with full-scale runs. Every output is
// compared with a convolution computed here from the same coefficients,
// rounded, shifted and saturated. Checks that exactly every second input
// produces an output, one clock later, and that saturation is flagged.
module tb_hb_decim;
  import ddc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic vld = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [15:0] y7, y11;
  logic v7, v11, s7, s11;
  int checks = 0, failures = 0, n_sat = 0;

  hb_decim dut7 (.clk, .rst, .vld_i(vld), .x_i(x), .y_o(y7), .vld_o(v7), .sat_o(s7));
  hb_decim #(.NTAPS(HB11_TAPS), .COEF(HB11_COEF), .SHIFT(HB11_SHIFT))
    dut11 (.clk, .rst, .vld_i(vld), .x_i(x), .y_o(y11), .vld_o(v11), .sat_o(s11));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   hist [$];
  int   n_in = 0;
  logic pend = 1'b0;
  longint e7, e11;

  function automatic longint filt(input int c [], input int sh);
    longint a = 0;
    for (int k = 0; k < c.size() && k < hist.size(); k++)
      a += longint'(c[k]) * longint'(hist[hist.size() - 1 - k]);
    return (a + (longint'(1) << (sh - 1))) >>> sh;
  endfunction

  task automatic cmp(input longint e, input logic signed [15:0] yy, input logic vv,
                     input logic ss, input string nm);
    logic es = (e > 32767) || (e < -32768);
    longint ec = es ? ((e > 0) ? 32767 : -32768) : e;
    checks++;
    if (!vv || longint'(yy) != ec || ss != es) begin
      failures++;
      if (failures < 10) $display("FAIL %s: y=%0d vld=%0b sat=%0b expected %0d %0b", nm, yy, vv, ss, ec, es);
    end
    if (ss) n_sat++;
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (pend) begin
        cmp(e7, y7, v7, s7, "7-tap");
        cmp(e11, y11, v11, s11, "11-tap");
      end else begin
        checks++;
        if (v7 || v11) begin
          failures++;
          $display("FAIL unexpected output");
        end
      end
      pend = 1'b0;
      if (vld) begin
        int c7 [], c11 [];
        c7 = new[HB7_TAPS];
        c11 = new[HB11_TAPS];
        foreach (c7[i]) c7[i] = HB7_COEF[i];
        foreach (c11[i]) c11[i] = HB11_COEF[i];
        hist.push_back(int'(x));
        n_in++;
        if (n_in % 2 == 0) begin
          pend = 1'b1;
          e7  = filt(c7, HB7_SHIFT);
          e11 = filt(c11, HB11_SHIFT);
        end
        if (hist.size() > 20) void'(hist.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 20000; i++) begin
      vld <= ($urandom_range(0, 2) != 0);
      if (i < 12000) x <= 16'($urandom_range(0, 65535));
      else begin
        // Full-scale samples with signs matched to the coefficient signs of
        // the 7-tap filter push its sum past full scale.
        case ($urandom_range(0, 3))
          0: x <= 16'sh7FFF;
          1: x <= 16'sh8000;
          default: x <= 16'($urandom_range(0, 65535));
        endcase
      end
      @(posedge clk);
    end
    vld <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never happened");
    end
    $display("saturated outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
