// tb_ask_frame_decoder: feeds the decoder carrier on/off streams built here
// from the sync pattern and bit codes (375 us sub-bits at 25 MHz, each edge
// moved by up to +-300 clocks of jitter, as a filtered receiver output
// would be). Checks a good frame above the LED threshold (valid, temp, LED
// on), one below it (LED off), a negative temperature, a frame with a wrong
// sync sub-bit (sync_err, LED kept), a frame with an invalid bit code
// (code_err), that the decoder ignores the line while disabled, and that dropping
// enable in mid-frame abandons the frame.
module tb_ask_frame_decoder;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, rx_bit = 1'b0;
  logic tick, tload, busy, valid, serr, cerr, led;
  logic [31:0] lv, rv, cnt;
  logic [7:0] temp;
  int checks = 0, failures = 0;
  localparam int SUB = 9375;
  int n_valid = 0, n_serr = 0, n_cerr = 0;

  always #20 clk = ~clk;

  ask_frame_decoder dut (.clk, .rst_n, .enable(en), .rx_bit, .sub_tick(tick), .timer_load(tload),
      .timer_load_value(lv), .timer_reload_value(rv), .busy, .temp, .valid, .sync_err(serr),
      .code_err(cerr), .led);
  esp_timer u_t (.clk, .rst_n, .en(1'b1), .load(tload), .load_value(lv), .reload_value(rv), .tick, .count(cnt));

  always @(posedge clk) if (rst_n) begin
    if (valid) n_valid++;
    if (serr) n_serr++;
    if (cerr) n_cerr++;
  end

  initial begin
    #400_000_000;
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

  // Sub-bit s starts at s*SUB plus its own jitter, so errors do not accumulate.
  task automatic play(input string f);
    int edge_at [64];
    int t = 0;
    for (int s = 0; s <= f.len(); s++)
      edge_at[s] = s * SUB + ((s == 0 || s == f.len()) ? 0 : int'($urandom_range(0, 600)) - 300);
    for (int s = 0; s < f.len(); s++)
      while (t < edge_at[s+1]) begin rx_bit = (f[s] == "1"); @(negedge clk); t++; end
    rx_bit = 1'b0;
    repeat (3 * SUB) @(negedge clk);
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    string f;
    repeat (4) @(negedge clk); rst_n = 1'b1;
    repeat (1000) @(negedge clk);
    play(ref_frame(8'd30));
    check(n_valid == 1 && temp == 8'd30 && led, "30 degrees: valid, LED on");
    play(ref_frame(8'd20));
    check(n_valid == 2 && temp == 8'd20 && !led, "20 degrees: LED off");
    play(ref_frame(8'd25));
    check(n_valid == 3 && temp == 8'd25 && led, "25 degrees: LED on at threshold");
    play(ref_frame(8'hF6));
    check(n_valid == 4 && temp == 8'hF6 && !led, $sformatf("-10 degrees: LED off (n=%0d temp=%h led=%0d s=%0d c=%0d)", n_valid, temp, led, n_serr, n_cerr));
    play(ref_frame(8'd40));
    f = ref_frame(8'd40);
    f[5] = "1";                                  // sync sub-bit 5 is 'off'
    play(f);
    check(n_serr == 1 && n_valid == 5 && led, "bad sync rejected, LED kept");
    f = ref_frame(8'd10);
    f[13 + 6 * 3 + 1] = "1";                     // bit 3 becomes 0,1,1,... neither code
    f[13 + 6 * 3 + 2] = "0";
    play(f);
    check(n_cerr == 1 && n_valid == 5 && temp == 8'd40, "bad code rejected");
    en = 1'b0;
    play(ref_frame(8'd5));
    check(n_valid == 5 && !busy, "ignored while disabled");
    // enable drops in the middle of a frame: no result, then a good frame again
    en = 1'b1;
    fork
      play(ref_frame(8'd33));
      begin repeat (30 * SUB) @(negedge clk); en = 1'b0; end
    join
    check(n_valid == 5 && n_serr == 1 && n_cerr == 1 && !busy, "frame abandoned when disabled");
    en = 1'b1;
    play(ref_frame(8'd33));
    check(n_valid == 6 && temp == 8'd33, "decodes again after re-enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
