// tb_rx_bit_decision: checks the threshold detector: '1' strictly above the
// threshold, '0' at or below, updated only on in_valid.
module tb_rx_bit_decision;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, b;
  logic signed [17:0] din = '0, thr = 18'sd800;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  rx_bit_decision dut (.clk, .rst_n, .in_data(din), .in_valid(vin), .threshold(thr), .bit_out(b));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int v, input int t);
    din = 18'(v); thr = 18'(t); vin = 1'b1;
    @(negedge clk);
    checks++;
    if (b != (v > t)) begin failures++; $display("FAIL in %0d thr %0d bit %0d", v, t, b); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    put(0, 800); put(800, 800); put(801, 800); put(1700, 800); put(-50, 800); put(-50, -60);
    for (int i = 0; i < 200; i++) put(int'($urandom_range(0, 6000)) - 1000, int'($urandom_range(0, 3000)));
    put(2000, 800);
    vin = 1'b0; din = 18'sd0;
    @(negedge clk);
    checks++; if (b != 1'b1) begin failures++; $display("FAIL: bit not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
