// tb_esp_timer: checks the interval timer: first tick load_value+2 clocks
// after load, then one every reload_value+1 clocks; no ticks while en is low;
// a new load restarts the interval.
module tb_esp_timer;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0, tick;
  logic [31:0] lv = '0, rv = '0, count;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  esp_timer dut (.clk, .rst_n, .en, .load, .load_value(lv), .reload_value(rv), .tick, .count);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_tick_after(input int n);
    int c = 0;
    while (!tick && c < 10000) begin @(negedge clk); c++; end
    checks++;
    if (c != n) begin failures++; $display("FAIL: tick after %0d, expected %0d", c, n); end
    @(negedge clk);
  endtask

  initial begin
    int c;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    en = 1'b1; lv = 32'd98; rv = 32'd9; load = 1'b1;
    @(negedge clk); load = 1'b0;
    expect_tick_after(99);            // 100 clocks after the load edge
    for (int i = 0; i < 5; i++) expect_tick_after(9);
    en = 1'b0; c = 0;
    repeat (100) begin @(negedge clk); if (tick) c++; end
    checks++; if (c != 0) begin failures++; $display("FAIL: ticks while disabled"); end
    en = 1'b1; lv = 32'd3; load = 1'b1;
    @(negedge clk); load = 1'b0;
    expect_tick_after(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
