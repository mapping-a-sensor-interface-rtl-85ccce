// tb_ask_dds: checks the ASK transmitter DDS.
// With enable high every output sample must equal round(8191*sin(2*pi*p/1024))
// for the top 10 bits p of a reference phase n*FTW (two clocks earlier), and
// the number of rising zero crossings over 25000 clocks (1 ms) must match a
// 10.7 MHz tone. With enable low the output must be zero.
module tb_ask_dds;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic signed [13:0] dac;
  int checks = 0, failures = 0;
  localparam longint unsigned FTW = 64'd1838246003;

  always #20 clk = ~clk;   // 25 MHz

  ask_dds dut (.clk, .rst_n, .enable, .dac_data(dac));

  function automatic int ref_sine(input longint unsigned n);
    longint unsigned ph;
    int p;
    ph = (n * FTW) & 64'hFFFF_FFFF;
    p  = int'(ph >> 22);
    return $rtoi($floor(8191.0 * $sin(2.0 * 3.14159265358979 * p / 1024.0) + 0.5));
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned n;
    int zc, bad;
    logic signed [13:0] prev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase at the clock edge after reset release is n = 0
    n = 0;
    @(negedge clk);
    enable = 1'b1;
    repeat (3) begin @(negedge clk); n++; end
    bad = 0; zc = 0; prev = dac;
    for (int i = 0; i < 25000; i++) begin
      // output at this point comes from the phase one step back
      if (int'(dac) != ref_sine(n - 1)) bad++;
      if (prev < 0 && dac >= 0) zc++;
      prev = dac;
      @(negedge clk); n++;
    end
    checks++; if (bad != 0) begin failures++; $display("FAIL: %0d samples differ", bad); end
    checks++; if (zc < 10699 || zc > 10701) begin failures++; $display("FAIL: %0d cycles in 1 ms", zc); end
    enable = 1'b0;
    repeat (3) @(negedge clk);
    bad = 0;
    for (int i = 0; i < 500; i++) begin if (dac != 0) bad++; @(negedge clk); end
    checks++; if (bad != 0) begin failures++; $display("FAIL: carrier off not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
