// tb_rx_envelope: checks the absolute-value envelope detector on random and
// edge-case inputs, including the saturating most negative value, and that
// the output holds while in_valid is low.
module tb_rx_envelope;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  logic signed [15:0] din = '0;
  logic [15:0] dout;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  rx_envelope dut (.clk, .rst_n, .in_data(din), .in_valid(vin), .out_data(dout), .out_valid(vout));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int v);
    int e;
    din = 16'(v); vin = 1'b1;
    @(negedge clk);
    e = (v == -32768) ? 32767 : (v < 0 ? -v : v);
    checks++;
    if (!vout || int'(dout) != e) begin failures++; $display("FAIL in %0d out %0d exp %0d", v, dout, e); end
  endtask

  initial begin
    int held;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    put(0); put(1); put(-1); put(32767); put(-32767); put(-32768); put(-2500); put(2500);
    for (int i = 0; i < 300; i++) put(int'($urandom_range(0, 65535)) - 32768);
    put(-1234);
    vin = 1'b0; din = 16'sd77;
    @(negedge clk);
    held = int'(dout);
    checks++; if (vout || held != 1234) begin failures++; $display("FAIL: output not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
