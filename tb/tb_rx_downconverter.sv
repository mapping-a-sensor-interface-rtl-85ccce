// tb_rx_downconverter: checks the receiver mixer sample by sample.
// Random 14-bit inputs; expected mix_out = (adc * round(8191*cos(2*pi*p/1024)))
// >>> 13, with p the top 10 bits of the LO phase n*LO_FTW, with the sample two clocks late.
// A second phase feeds a 10.7 MHz tone and checks that the 500-sample mean of
// the output times a 50 kHz reference shows the 50 kHz difference product.
module tb_rx_downconverter;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc = '0;
  logic signed [15:0] mix;
  int checks = 0, failures = 0;
  localparam longint unsigned LO = 64'd1829656068;
  localparam real PI = 3.14159265358979;

  always #20 clk = ~clk;

  rx_downconverter dut (.clk, .rst_n, .adc_data(adc), .mix_out(mix));

  function automatic int lo_cos(input longint unsigned n);
    int p;
    p = int'(((n * LO) & 64'hFFFF_FFFF) >> 22);
    p = (p + 256) % 1024;
    return $rtoi($floor(8191.0 * $sin(2.0 * PI * p / 1024.0) + 0.5));
  endfunction

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned n;
    int bad;
    int hist [3];
    longint prod;
    real corr_i, corr_q, mag;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n = 0; bad = 0;
    hist = '{0, 0, 0};
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        prod = longint'(hist[1]) * lo_cos(n - 1);
        if (int'(mix) != int'(prod >>> 13)) bad++;
      end
      hist[1] = hist[0];
      adc = 14'($urandom);
      hist[0] = int'(adc);
      n++;
    end
    checks++; if (bad != 0) begin failures++; $display("FAIL: %0d mixer samples differ", bad); end
    // tone test: 10.7 MHz in, expect energy at 50 kHz
    corr_i = 0; corr_q = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      adc = 14'($rtoi(4000.0 * $cos(2.0 * PI * 10.7e6 * i / 25.0e6)));
      corr_i += real'(mix) * $cos(2.0 * PI * 50.0e3 * i / 25.0e6);
      corr_q += real'(mix) * $sin(2.0 * PI * 50.0e3 * i / 25.0e6);
    end
    mag = 2.0 * $sqrt(corr_i * corr_i + corr_q * corr_q) / 5000.0;
    checks++; if (mag < 1800.0 || mag > 2200.0) begin failures++; $display("FAIL: 50 kHz amplitude %f", mag); end
    $display("50 kHz amplitude %f (expected about 2000)", mag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
