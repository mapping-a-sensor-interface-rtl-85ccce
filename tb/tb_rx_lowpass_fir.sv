// tb_rx_lowpass_fir: checks the order-50 lowpass.
// 1) An impulse of 32768 gives the 51 coefficients, which must be symmetric
//    and match the filter design (listed here independently).
// 2) A constant input of 1000 settles to 1000*32733/32768 = 998.
// 3) A 100 kHz tone (five samples per period at 500 kS/s) on top of 2000 is
//    attenuated to within +-2 of the DC level.
// 4) Random inputs are compared with a direct convolution.
// Samples are presented every 50 clocks as in the receiver; out_valid must
// follow in_valid by one clock.
module tb_rx_lowpass_fir;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  logic [15:0] din = '0;
  logic signed [17:0] dout;
  int checks = 0, failures = 0;
  int h [51] = '{6, 12, 23, 34, 44, 47, 38, 12, -37, -107, -195, -287, -366, -408, -386, -275,
                 -57, 276, 718, 1247, 1826, 2407, 2936, 3360, 3634, 3729, 3634, 3360, 2936, 2407,
                 1826, 1247, 718, 276, -57, -275, -386, -408, -366, -287, -195, -107, -37, 12,
                 38, 47, 44, 34, 23, 12, 6};
  int hist [51];

  always #20 clk = ~clk;

  rx_lowpass_fir dut (.clk, .rst_n, .in_data(din), .in_valid(vin), .out_data(dout), .out_valid(vout));

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int v, output int y);
    din = 16'(v); vin = 1'b1;
    for (int k = 50; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    @(negedge clk);
    vin = 1'b0;
    if (!vout) begin failures++; checks++; $display("FAIL: no out_valid"); end
    y = int'(dout);
    repeat (49) @(negedge clk);
  endtask

  function automatic int conv();
    longint s = 0;
    for (int k = 0; k < 51; k++) s += longint'(hist[k]) * h[k];
    return int'(s >>> 15);
  endfunction

  initial begin
    int y, bad, lo, hi;
    for (int k = 0; k < 51; k++) hist[k] = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    // impulse
    bad = 0;
    for (int i = 0; i < 51; i++) begin
      put(i == 0 ? 32768 : 0, y);
      if (y != h[i]) bad++;
    end
    checks++; if (bad) begin failures++; $display("FAIL: impulse response, %0d taps", bad); end
    // step
    for (int i = 0; i < 60; i++) put(1000, y);
    checks++; if (y != 998) begin failures++; $display("FAIL: DC %0d", y); end
    // 100 kHz ripple
    lo = 99999; hi = -99999;
    for (int i = 0; i < 120; i++) begin
      put(2000 + ((i % 5) == 0 ? 800 : (i % 5 == 1 || i % 5 == 4) ? 247 : -647), y);
      if (i > 60) begin if (y < lo) lo = y; if (y > hi) hi = y; end
    end
    checks++; if (lo < 1995 || hi > 2001) begin failures++; $display("FAIL: ripple %0d..%0d", lo, hi); end
    // random
    bad = 0;
    for (int i = 0; i < 200; i++) begin
      put(int'($urandom_range(0, 32767)), y);
      if (y != conv()) bad++;
    end
    checks++; if (bad) begin failures++; $display("FAIL: %0d random outputs differ", bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
