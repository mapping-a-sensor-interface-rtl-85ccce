// tb_rx_decimator: checks the decimate-by-50 stage.
// Random inputs; every out_valid must come exactly 50 clocks after the
// previous one and carry (sum of the last 50 inputs * 1311) >>> 16.
module tb_rx_decimator;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] din = '0, dout;
  logic vld;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  rx_decimator dut (.clk, .rst_n, .in_data(din), .out_data(dout), .out_valid(vld));

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum, expv;
    int since, outs, cnt;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    sum = 0; since = 0; outs = 0; cnt = 0;
    for (int i = 0; i < 50 * 40; i++) begin
      din = 16'($urandom_range(0, 40000) - 20000);
      if (i % 400 < 50) din = 16'sd20000;      // some full-scale blocks
      sum += longint'(din);
      cnt++;
      @(negedge clk);
      since++;
      if (cnt == 50) begin
        expv = (sum * 1311) >>> 16;
        checks++;
        if (!vld || longint'(dout) != expv) begin
          failures++; $display("FAIL block %0d: vld=%0d got %0d exp %0d", outs, vld, dout, expv);
        end
        if (outs > 0) begin
          checks++; if (since != 50) begin failures++; $display("FAIL: spacing %0d", since); end
        end
        since = 0; sum = 0; cnt = 0; outs++;
      end else if (vld) begin
        failures++; $display("FAIL: unexpected out_valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
