// tb_ask_frame_encoder: the encoder driving a sub-bit timer at the default
// 9375 clocks. For several bytes it samples carrier_on in the middle of each
// sub-bit and compares it with a frame built here from the sync pattern
// "on off on on off off on off on on off off on" and the codes
// '0' = off on on off on on, '1' = off off on off off on, MSB first. It also
// checks that the carrier goes off exactly 61*9375 clocks (22.875 ms) after
// send, that done pulses then, and that a send while busy is ignored, and that cancel ends a frame at once.
module tb_ask_frame_encoder;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, send = 1'b0, cancel = 1'b0;
  logic [7:0] data = '0;
  logic tick, tload, carrier, busy, done;
  logic [31:0] lv, rv, cnt;
  int checks = 0, failures = 0;
  localparam int SUB = 9375;

  always #20 clk = ~clk;

  ask_frame_encoder dut (.clk, .rst_n, .cancel, .send, .data, .sub_tick(tick), .timer_load(tload),
      .timer_load_value(lv), .timer_reload_value(rv), .carrier_on(carrier), .busy, .done);
  esp_timer u_t (.clk, .rst_n, .en(1'b1), .load(tload), .load_value(lv), .reload_value(rv), .tick, .count(cnt));

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string ref_frame(input logic [7:0] d);
    string s;
    s = "1011001011001";
    for (int b = 7; b >= 0; b--) s = {s, d[b] ? "001001" : "011011"};
    return s;
  endfunction

  task automatic send_and_check(input logic [7:0] d);
    string f;
    int bad = 0, dur = 0;
    logic saw_done = 1'b0;
    f = ref_frame(d);
    @(negedge clk); data = d; send = 1'b1;
    @(negedge clk); send = 1'b0; data = 8'hFF;
    for (int s = 0; s < 61; s++) begin
      for (int c = 0; c < SUB; c++) begin
        if (c == SUB / 2 && carrier != (f[s] == "1")) bad++;
        if (s == 30 && c == 10) begin send = 1'b1; data = 8'h00; end   // ignored
        if (s == 30 && c == 11) send = 1'b0;
        if (done) saw_done = 1'b1;
        if (carrier || busy) dur++;
        @(negedge clk);
      end
    end
    repeat (5) begin if (done) saw_done = 1'b1; @(negedge clk); end
    checks++; if (bad) begin failures++; $display("FAIL: data %h, %0d sub-bits wrong", d, bad); end
    checks++; if (dur != 61 * SUB) begin failures++; $display("FAIL: frame lasted %0d clocks", dur); end
    checks++; if (!saw_done || busy || carrier) begin failures++; $display("FAIL: end of frame"); end
  endtask

  initial begin
    repeat (4) @(negedge clk); rst_n = 1'b1;
    repeat (100) @(negedge clk);
    checks++; if (carrier) begin failures++; $display("FAIL: carrier on at idle"); end
    send_and_check(8'h1B);
    send_and_check(8'hA5);
    send_and_check(8'h00);
    send_and_check(8'hFF);
    // cancel in the middle of a frame, then a normal frame again
    @(negedge clk); data = 8'h81; send = 1'b1;
    @(negedge clk); send = 1'b0;
    repeat (20 * SUB + SUB / 2) @(negedge clk);
    cancel = 1'b1;
    @(negedge clk); cancel = 1'b0;
    checks++; if (busy || carrier) begin failures++; $display("FAIL: cancel did not end the frame"); end
    repeat (3 * SUB) @(negedge clk);
    checks++; if (busy || carrier) begin failures++; $display("FAIL: carrier came back after cancel"); end
    send_and_check(8'h5A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
