// tb_mixer: random and corner-case operand pairs; each product is checked
// against floor(a*b / 2^11) saturated to 16 bits, one clock later.
module tb_mixer;
  logic clk = 1'b0, rst = 1'b1;
  logic vld = 1'b0;
  logic signed [11:0] a = '0;
  logic signed [15:0] b = '0;
  logic signed [15:0] p;
  logic vo;
  int checks = 0, failures = 0;

  mixer dut (.clk, .rst, .vld_i(vld), .a_i(a), .b_i(b), .p_o(p), .vld_o(vo));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_p(input int x, input int y);
    longint q = (longint'(x) * longint'(y));
    q = (q >= 0) ? q / 2048 : -((-q + 2047) / 2048);   // floor division
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return int'(q);
  endfunction

  initial begin
    int ea, eb;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 20000; i++) begin
      case (i)
        0: begin ea = -2048; eb = -32768; end
        1: begin ea = 2047;  eb = 32767;  end
        2: begin ea = -2048; eb = 32767;  end
        3: begin ea = 2047;  eb = -32768; end
        4: begin ea = -1;    eb = 1;      end
        default: begin
          ea = int'($urandom_range(0, 4095)) - 2048;
          eb = int'($urandom_range(0, 65535)) - 32768;
        end
      endcase
      a <= 12'(ea); b <= 16'(eb); vld <= 1'b1;
      @(posedge clk);
      vld <= 1'b0;
      #1;
      checks++;
      if (!vo || int'(p) != expect_p(ea, eb)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d: p=%0d vld=%0b expected %0d", ea, eb, p, vo, expect_p(ea, eb));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
