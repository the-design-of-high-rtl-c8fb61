// tb_dds: drives the DDS with several frequency words and random enable gaps
// and compares every sine sample with a value computed here from the ideal
// phase j * fcw: exactly against the sine of the phase truncated to 17 bits, and within 4 LSB
// of the untruncated sine. Also checks the two-clock latency, and that a
// frequency change keeps the phase continuous.
module tb_dds;
  import ddc_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0;
  logic [31:0] fcw = '0;
  logic signed [15:0] s;
  logic vld;
  int checks = 0, failures = 0;

  dds dut (.clk, .rst, .en_i(en), .fcw_i(fcw), .sin_o(s), .vld_o(vld));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected samples, in order, and the cycle each enable was given.
  logic [31:0] exp_phase [$];
  int          exp_cycle [$];
  logic [31:0] phase = '0;
  int          cycle = 0;

  always @(posedge clk) begin
    cycle++;
    if (!rst && en) begin
      exp_phase.push_back(phase);
      exp_cycle.push_back(cycle);
      phase = phase + fcw;
    end
    if (!rst && vld) begin
      logic [31:0] p;
      int c, e;
      real a, ideal;
      p = exp_phase.pop_front();
      c = exp_cycle.pop_front();
      a = 32767.0 * $sin(2.0 * PI * (real'(p[31:15]) + 0.5) / 131072.0);
      e = (a >= 0.0) ? $rtoi($floor(a + 0.5)) : -$rtoi($floor(-a + 0.5));
      ideal = 32767.0 * $sin(2.0 * PI * real'(p) / 4294967296.0);
      checks += 3;
      if (int'(s) != e) begin
        failures++;
        if (failures < 10) $display("FAIL phase %h: sin=%0d expected %0d", p, s, e);
      end
      if ((real'(s) - ideal) > 4.0 || (ideal - real'(s)) > 4.0) begin
        failures++;
        if (failures < 10) $display("FAIL phase %h: sin=%0d ideal %f", p, s, ideal);
      end
      if (cycle - c != 3) begin  // loaded at edge c+2, seen at edge c+3
        failures++;
        $display("FAIL latency %0d", cycle - c);
      end
    end
  end

  initial begin
    logic [31:0] words [6];
    words = '{32'h4D52316D, 32'h28000000, 32'h00010000, 32'h7FFFFFFF, 32'h80000001, 32'h12345678};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    foreach (words[w]) begin
      fcw <= words[w];
      for (int i = 0; i < 30000; i++) begin
        en <= ($urandom_range(0, 9) != 0);
        @(posedge clk);
      end
    end
    en <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_phase.size() != 0) begin
      failures++;
      $display("FAIL %0d samples never came out", exp_phase.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
