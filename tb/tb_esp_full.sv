// tb_esp_full: two complete sensor-to-LED operations with every parameter of
// the node at its default. Node A (transmitter) reads its DS1721 model when
// the 2 s sampling timer first expires (50,000,000 clocks after reset), sends
// the reading, and node B (receiver), whose ADC sees A's DAC output at half
// amplitude, decodes it and turns its LED on (30 degrees is above the default
// threshold of 25). The next reading, 2 s later, is 20 degrees and turns the
// LED off. Checks the reading time, the 2 s sampling instants, the 22.875 ms
// frame, the decoded values and the LED.
module tb_esp_full;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  logic signed [13:0] a_dac, b_dac, b_adc;
  logic a_scl_oe, a_sda_oe, a_scl, a_sda, as_sda, as_scl;
  logic b_scl_oe, b_sda_oe, b_scl, b_sda;
  logic [7:0] a_tx_temp, a_rx_temp, b_tx_temp, b_rx_temp;
  logic a_rfc_busy, a_rfc_done, b_rfc_busy, b_rfc_done;
  logic a_tv, a_serr, a_txbusy, a_carrier, a_rxbit, a_rxv, a_rxs, a_rxc, a_led;
  logic b_tv, b_serr, b_txbusy, b_carrier, b_rxbit, b_rxv, b_rxs, b_rxc, b_led;
  logic signed [17:0] a_level, b_level;
  logic [7:0] as_log [16];
  int as_wr, as_st, as_sp, as_rd;
  logic [7:0] sensor_msb = 8'd30;

  assign a_scl = !(a_scl_oe | as_scl);
  assign a_sda = !(a_sda_oe | as_sda);
  assign b_scl = !b_scl_oe;
  assign b_sda = !b_sda_oe;
  assign b_adc = a_dac >>> 1;

  esp_top node_a (
    .clk, .rst_n, .role_rx(1'b0), .adc_data(14'sd0), .dac_data(a_dac),
    .i2c_scl_i(a_scl), .i2c_sda_i(a_sda), .i2c_scl_oe(a_scl_oe), .i2c_sda_oe(a_sda_oe),
    .rx_threshold(18'sd600), .rfc_req(1'b0), .rfc_addr(7'h00), .rfc_data(16'h0),
    .rfc_busy(a_rfc_busy), .rfc_done(a_rfc_done),
    .tx_temp(a_tx_temp), .tx_temp_valid(a_tv), .sensor_err(a_serr), .tx_busy(a_txbusy), .carrier_on(a_carrier),
    .rx_bit(a_rxbit), .rx_level(a_level), .rx_temp(a_rx_temp), .rx_valid(a_rxv), .rx_sync_err(a_rxs),
    .rx_code_err(a_rxc), .led(a_led));
  i2c_device_model #(.ADDR(7'h48)) a_sensor (.clk, .scl(a_scl), .sda(a_sda), .sda_oe(as_sda), .scl_oe(as_scl),
      .temp_msb(sensor_msb), .temp_lsb(8'h80), .wr_log(as_log), .wr_count(as_wr), .starts(as_st), .stops(as_sp), .reads(as_rd));

  esp_top node_b (
    .clk, .rst_n, .role_rx(1'b1), .adc_data(b_adc), .dac_data(b_dac),
    .i2c_scl_i(b_scl), .i2c_sda_i(b_sda), .i2c_scl_oe(b_scl_oe), .i2c_sda_oe(b_sda_oe),
    .rx_threshold(18'sd600), .rfc_req(1'b0), .rfc_addr(7'h00), .rfc_data(16'h0),
    .rfc_busy(b_rfc_busy), .rfc_done(b_rfc_done),
    .tx_temp(b_tx_temp), .tx_temp_valid(b_tv), .sensor_err(b_serr), .tx_busy(b_txbusy), .carrier_on(b_carrier),
    .rx_bit(b_rxbit), .rx_level(b_level), .rx_temp(b_rx_temp), .rx_valid(b_rxv), .rx_sync_err(b_rxs),
    .rx_code_err(b_rxc), .led(b_led));

  int cyc = 0;
  int t_rxv = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && b_rxv) t_rxv <= cyc;

  initial begin
    #4_300_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t_rst, t_read, t_tv, t_frame_end, t_rx;
    repeat (4) @(negedge clk); rst_n = 1'b1; t_rst = cyc;
    while (!node_a.u_sampler.busy || node_a.u_sampler.txn != node_a.u_sampler.T_READ) @(negedge clk);
    t_read = cyc;
    while (!a_tv) @(negedge clk);
    t_tv = cyc;
    while (!(a_txbusy == 1'b0 && a_carrier == 1'b0 && cyc > t_tv + 10)) @(negedge clk);
    t_frame_end = cyc;
    repeat (50_000) @(negedge clk);
    t_rx = t_rxv;
    $display("reading started %0d clocks after reset, took %0d, frame %0d clocks, decoded %0d clocks after the reading",
             t_read - t_rst, t_tv - t_read, t_frame_end - t_tv, t_rx - t_tv);
    check(as_log[0] == 8'h51, "Start Convert after reset");
    check(t_read - t_rst > 49_990_000 && t_read - t_rst < 50_010_000, "first reading after 2 s");
    check(t_tv - t_read > 9000 && t_tv - t_read < 10500, "reading about 400 us");
    check(a_tx_temp == 8'd30, "temperature read");
    check(t_frame_end - t_tv > 571_875 - 10 && t_frame_end - t_tv < 571_875 + 10, "frame 22.875 ms");
    check(b_rx_temp == 8'd30 && !b_rxs && !b_rxc, "receiver decoded 30");
    check(t_rx > t_tv + 571_875 - 9375 && t_rx < t_tv + 571_875 + 9375, "decoded at the end of the frame");
    check(b_led, "LED on");
    // second reading, one sampling interval after the first
    sensor_msb = 8'd20;
    while (!a_tv || cyc <= t_tv + 10) @(negedge clk);
    $display("second reading %0d clocks after the first", cyc - t_tv);
    check(cyc - t_tv == 50_000_000, "readings 2 s apart");
    check(a_tx_temp == 8'd20, "second temperature read");
    repeat (600_000) @(negedge clk);
    check(b_rx_temp == 8'd20 && !b_led, "second value decoded, LED off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
