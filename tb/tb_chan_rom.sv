// tb_chan_rom: checks the channel ROM against the two published table
// entries, against the grid formula for random channels, the one-clock read
// latency, and that out-of-range channel numbers keep the previous word.
module tb_chan_rom;
  import ddc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [CHAN_W-1:0] chan = 11'd1;
  logic [31:0] fcw;
  logic bad;
  int checks = 0, failures = 0;

  chan_rom dut (.clk, .rst, .chan_i(chan), .fcw_o(fcw), .bad_chan_o(bad));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp, input logic exp_bad, input string what);
    checks++;
    if (fcw !== exp || bad !== exp_bad) begin
      failures++;
      $display("FAIL %s: fcw=%h bad=%0b, expected %h %0b", what, fcw, bad, exp, exp_bad);
    end
  endtask

  // Reference: frequency of channel c is f0 + (c-1)*df, word = f * 2^32 / fs,
  // with f0 and df taken from the first two table entries.
  function automatic logic [31:0] ref_fcw(input int c);
    longint w = 64'h4D52316D + longint'(c - 1) * (64'h4D5990DD - 64'h4D52316D);
    return w[31:0];
  endfunction

  initial begin
    logic [31:0] last;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Published entries.
    chan <= 11'd1; @(posedge clk); #1 check(32'h4D52316D, 1'b0, "channel 1");
    chan <= 11'd2; @(posedge clk); #1 check(32'h4D5990DD, 1'b0, "channel 2");
    // One-clock latency: the word changes exactly one edge after the input.
    chan <= 11'd693;
    #1 check(32'h4D5990DD, 1'b0, "latency (before edge)");
    @(posedge clk); #1 check(ref_fcw(693), 1'b0, "channel 693");
    for (int i = 0; i < 3000; i++) begin
      int c = 1 + int'($urandom_range(0, N_CHAN - 1));
      chan <= CHAN_W'(c);
      @(posedge clk); #1 check(ref_fcw(c), 1'b0, $sformatf("channel %0d", c));
    end
    chan <= 11'd1800; @(posedge clk); #1 check(ref_fcw(1800), 1'b0, "channel 1800");
    last = fcw;
    chan <= 11'd0;    @(posedge clk); #1 check(last, 1'b1, "channel 0 rejected");
    chan <= 11'd1801; @(posedge clk); #1 check(last, 1'b1, "channel 1801 rejected");
    chan <= 11'd2047; @(posedge clk); #1 check(last, 1'b1, "channel 2047 rejected");
    chan <= 11'd5;    @(posedge clk); #1 check(ref_fcw(5), 1'b0, "channel 5 after bad");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
