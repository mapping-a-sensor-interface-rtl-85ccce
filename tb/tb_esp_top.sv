// tb_esp_top: end-to-end test of two platform nodes over a wired "air" link.
//
// Node A (role_rx = 0) has a DS1721 model and a clock-stretching control chip
// on its I2C bus; node B (role_rx = 1) has only a control chip, so its Start
// Convert is not answered. B's ADC sees A's DAC output at half amplitude plus
// bursts of 10.7 MHz carrier keyed by the testbench. The sampling interval is
// shortened to 1.4M clocks (56 ms); all other parameters are the defaults.
// The sensor temperature changes between readings (30, 20, 27, -5 degrees),
// so the LED must go on, off, on and off. Between readings the testbench
// keys a short false burst (must end in a sync error) and a frame with a good
// sync word but a broken bit code (code error). Finally node A is switched
// to the receiver role in the middle of a frame (carrier must stop at once,
// no readings follow, B reports a code error for the truncated frame) and
// back (the next reading comes one full interval later, reaches B and turns
// the LED on). Each mechanism is counted and
// a failure is counted for any that never happened. Timing checks: sensor
// read about 400 us, frame 61 sub-bits of 9375 clocks, decode within 25 ms of
// the frame start.
module tb_esp_top;
  timeunit 1ns; timeprecision 1ps;
  localparam int PERIOD = 1_400_000;
  localparam int SUB    = 9375;
  localparam real PI    = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  // ---------------- node A: transmitter ----------------
  logic signed [13:0] a_dac, b_dac, b_adc;
  logic a_scl_oe, a_sda_oe, a_scl, a_sda, as_sda, as_scl, ac_sda, ac_scl;
  logic a_rfc_req = 1'b0, a_rfc_busy, a_rfc_done;
  logic [15:0] a_rfc_data = '0;
  logic [7:0] a_tx_temp, a_rx_temp;
  logic a_tv, a_serr, a_txbusy, a_carrier, a_rxbit, a_rxv, a_rxs, a_rxc, a_led;
  logic signed [17:0] a_level, b_level;
  logic [7:0] as_log [16], ac_log [16];
  int as_wr, as_st, as_sp, as_rd, ac_wr, ac_st, ac_sp, ac_rd;
  logic [7:0] sensor_msb = 8'd30;
  logic a_role = 1'b0;

  assign a_scl = !(a_scl_oe | as_scl | ac_scl);
  assign a_sda = !(a_sda_oe | as_sda | ac_sda);

  esp_top #(.SAMPLE_PERIOD_CYCLES(PERIOD)) node_a (
    .clk, .rst_n, .role_rx(a_role), .adc_data(14'sd0), .dac_data(a_dac),
    .i2c_scl_i(a_scl), .i2c_sda_i(a_sda), .i2c_scl_oe(a_scl_oe), .i2c_sda_oe(a_sda_oe),
    .rx_threshold(18'sd600), .rfc_req(a_rfc_req), .rfc_addr(7'h2C), .rfc_data(a_rfc_data),
    .rfc_busy(a_rfc_busy), .rfc_done(a_rfc_done),
    .tx_temp(a_tx_temp), .tx_temp_valid(a_tv), .sensor_err(a_serr), .tx_busy(a_txbusy), .carrier_on(a_carrier),
    .rx_bit(a_rxbit), .rx_level(a_level), .rx_temp(a_rx_temp), .rx_valid(a_rxv), .rx_sync_err(a_rxs),
    .rx_code_err(a_rxc), .led(a_led));
  i2c_device_model #(.ADDR(7'h48)) a_sensor (.clk, .scl(a_scl), .sda(a_sda), .sda_oe(as_sda), .scl_oe(as_scl),
      .temp_msb(sensor_msb), .temp_lsb(8'h00), .wr_log(as_log), .wr_count(as_wr), .starts(as_st), .stops(as_sp), .reads(as_rd));
  i2c_device_model #(.ADDR(7'h2C), .STRETCH(300)) a_ctrl (.clk, .scl(a_scl), .sda(a_sda), .sda_oe(ac_sda), .scl_oe(ac_scl),
      .temp_msb(8'h00), .temp_lsb(8'h00), .wr_log(ac_log), .wr_count(ac_wr), .starts(ac_st), .stops(ac_sp), .reads(ac_rd));

  // ---------------- node B: receiver ----------------
  logic b_scl_oe, b_sda_oe, b_scl, b_sda, bc_sda, bc_scl;
  logic b_rfc_req = 1'b0, b_rfc_busy, b_rfc_done;
  logic [7:0] b_tx_temp, b_rx_temp;
  logic b_tv, b_serr, b_txbusy, b_carrier, b_rxbit, b_rxv, b_rxs, b_rxc, b_led;
  logic [7:0] bc_log [16];
  int bc_wr, bc_st, bc_sp, bc_rd;

  assign b_scl = !(b_scl_oe | bc_scl);
  assign b_sda = !(b_sda_oe | bc_sda);

  esp_top #(.SAMPLE_PERIOD_CYCLES(PERIOD)) node_b (
    .clk, .rst_n, .role_rx(1'b1), .adc_data(b_adc), .dac_data(b_dac),
    .i2c_scl_i(b_scl), .i2c_sda_i(b_sda), .i2c_scl_oe(b_scl_oe), .i2c_sda_oe(b_sda_oe),
    .rx_threshold(18'sd600), .rfc_req(b_rfc_req), .rfc_addr(7'h2D), .rfc_data(16'h0F0F),
    .rfc_busy(b_rfc_busy), .rfc_done(b_rfc_done),
    .tx_temp(b_tx_temp), .tx_temp_valid(b_tv), .sensor_err(b_serr), .tx_busy(b_txbusy), .carrier_on(b_carrier),
    .rx_bit(b_rxbit), .rx_level(b_level), .rx_temp(b_rx_temp), .rx_valid(b_rxv), .rx_sync_err(b_rxs),
    .rx_code_err(b_rxc), .led(b_led));
  i2c_device_model #(.ADDR(7'h2D)) b_ctrl (.clk, .scl(b_scl), .sda(b_sda), .sda_oe(bc_sda), .scl_oe(bc_scl),
      .temp_msb(8'h00), .temp_lsb(8'h00), .wr_log(bc_log), .wr_count(bc_wr), .starts(bc_st), .stops(bc_sp), .reads(bc_rd));

  // ---------------- channel ----------------
  int cyc = 0;
  logic jam = 1'b0;
  int   jam_sig, sum;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb begin
    jam_sig = jam ? $rtoi(4000.0 * $sin(2.0 * PI * 10.7e6 * cyc / 25.0e6 + 0.7)) : 0;
    sum = int'(a_dac) / 2 + jam_sig;
    if (sum > 8191) sum = 8191;
    if (sum < -8192) sum = -8192;
    b_adc = 14'(sum);
  end

  // ---------------- bookkeeping ----------------
  int n_read = 0, n_frames = 0, n_rxv = 0, n_sync_err = 0, n_code_err = 0, n_b_bus_err = 0;
  int n_led_on = 0, n_led_off = 0, n_carrier_on = 0, n_zero_bits = 0, n_one_bits = 0;
  int n_rfc_a = 0, n_rfc_b = 0, n_stretch = 0, n_bad_temp = 0, n_bad_frame_len = 0, n_bad_read = 0;
  int n_bad_latency = 0, n_aborted = 0, n_role_switch = 0;
  logic a_role_d = 1'b0;
  logic a_txbusy_d = 0, a_carrier_d = 0, b_led_d = 0, a_samp_busy_d = 0, a_scl_d = 1;
  int frame_start = 0, read_start = 0, low_run = 0;
  logic [7:0] sent [$];

  always @(posedge clk) if (rst_n) begin
    a_txbusy_d    <= a_txbusy;
    a_carrier_d   <= a_carrier;
    b_led_d       <= b_led;
    a_samp_busy_d <= node_a.u_sampler.busy;
    a_scl_d       <= a_scl;
    if (node_a.u_sampler.busy && !a_samp_busy_d) read_start <= cyc;
    if (a_tv) begin
      n_read++;
      if (cyc - read_start < 9000 || cyc - read_start > 10500) n_bad_read++;
      sent.push_back(a_tx_temp);
      for (int b = 0; b < 8; b++) if (a_tx_temp[b]) n_one_bits++; else n_zero_bits++;
    end
    if (a_txbusy && !a_txbusy_d) frame_start <= cyc;
    a_role_d <= a_role;
    if (a_role != a_role_d) n_role_switch++;
    if (!a_txbusy && a_txbusy_d) begin
      if (a_role) n_aborted++;
      else begin
        n_frames++;
        if (cyc - frame_start != 61 * SUB) n_bad_frame_len++;
      end
    end
    if (a_carrier && !a_carrier_d) n_carrier_on++;
    if (b_rxv) begin
      n_rxv++;
      if (sent.size() == 0 || b_rx_temp != sent[0]) begin n_bad_temp++; $display("bad temp %h", b_rx_temp); end
      if (sent.size() != 0) void'(sent.pop_front());
      if (cyc - frame_start > 25 * 25000) n_bad_latency++;
    end
    if (b_rxs) n_sync_err++;
    if (b_rxc) n_code_err++;
    if (b_serr) n_b_bus_err++;
    if (b_led && !b_led_d) n_led_on++;
    if (!b_led && b_led_d) n_led_off++;
    if (a_rfc_done) n_rfc_a++;
    if (b_rfc_done) n_rfc_b++;
    // SCL held low by the control chip while the master has released it
    if (!a_scl_oe && ac_scl) low_run <= low_run + 1;
    else begin if (low_run > 50) n_stretch++; low_run <= 0; end
  end

  initial begin
    #900_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic key_tone(input string f);
    for (int s = 0; s < f.len(); s++) begin
      jam = (f[s] == "1");
      repeat (SUB) @(negedge clk);
    end
    jam = 1'b0;
  endtask

  task automatic wait_until(input int c);
    while (cyc < c) @(negedge clk);
  endtask

  function automatic string frame_str(input logic [7:0] d);
    string s = "1011001011001";
    for (int b = 7; b >= 0; b--) s = {s, d[b] ? "001001" : "011011"};
    return s;
  endfunction

  initial begin
    string f;
    int t_back;
    repeat (4) @(negedge clk); rst_n = 1'b1;
    // control writes on both nodes right after reset
    wait_until(20_000);
    @(negedge clk); a_rfc_data = 16'h5A01; a_rfc_req = 1'b1; b_rfc_req = 1'b1;
    @(negedge clk); a_rfc_req = 1'b0; b_rfc_req = 1'b0;
    // reading 1 at PERIOD, 30 degrees
    wait_until(PERIOD + PERIOD / 2);     sensor_msb = 8'd20;
    wait_until(2 * PERIOD + 600_000);    key_tone("111");          // false trigger
    wait_until(3 * PERIOD - 50_000);     sensor_msb = 8'd27;
    wait_until(3 * PERIOD + 600_000);    // good sync, broken code in data bit 0
    f = frame_str(8'h3C); f[13] = "1"; f[14] = "1"; key_tone(f);
    wait_until(4 * PERIOD - 50_000);     sensor_msb = 8'hFB;        // -5 degrees
    wait_until(4 * PERIOD + 640_000);
    check(n_led_on == 2 && n_led_off == 2 && !b_led, "LED on, off, on, off");
    // role switch: node A leaves the transmitter role in the middle of frame 5
    sensor_msb = 8'd45;
    wait_until(5 * PERIOD + 300_000);
    check(a_txbusy && a_carrier !== 1'bx, "frame 5 in progress");
    @(negedge clk); a_role = 1'b1;
    repeat (3) @(negedge clk);
    check(!a_txbusy && !a_carrier && a_dac == 0, "carrier off after leaving the transmitter role");
    void'(sent.pop_back());                          // frame 5 never completes
    repeat (PERIOD + 100_000) @(negedge clk);
    check(n_read == 5, "no readings in the receiver role");
    @(negedge clk); a_role = 1'b0; t_back = cyc;
    wait_until(t_back + PERIOD + 20_000);
    check(n_read == 6 && read_start - t_back > PERIOD - 10 && read_start - t_back < PERIOD + 10,
          "first reading one period after returning to the transmitter role");
    wait_until(t_back + PERIOD + 640_000);
    $display("reads %0d frames %0d aborted %0d decoded %0d sync_err %0d code_err %0d led on %0d off %0d",
             n_read, n_frames, n_aborted, n_rxv, n_sync_err, n_code_err, n_led_on, n_led_off);
    $display("carrier bursts %0d, bits sent 0:%0d 1:%0d, rfc A %0d B %0d, stretches %0d, B bus errors %0d, role switches %0d",
             n_carrier_on, n_zero_bits, n_one_bits, n_rfc_a, n_rfc_b, n_stretch, n_b_bus_err, n_role_switch);
    check(as_wr >= 1 && as_log[0] == 8'h51, "Start Convert sent to the sensor");
    check(n_read == 6, "six sensor readings");
    check(n_bad_read == 0, "sensor read about 400 us");
    check(n_frames == 5 && n_aborted == 1, "five frames sent, one aborted");
    check(n_role_switch == 2, "role switched twice");
    check(n_bad_frame_len == 0, "frame length 61 sub-bits");
    check(n_carrier_on > 0, "carrier keyed");
    check(n_zero_bits > 0 && n_one_bits > 0, "both bit codes sent");
    check(n_rxv == 5 && b_rx_temp == 8'd45 && b_led, "five frames decoded, last one 45 degrees");
    check(n_bad_temp == 0, "decoded temperatures equal the sent ones");
    check(n_bad_latency == 0, "decode within 25 ms of frame start");
    check(n_sync_err == 1, "false burst gives a sync error");
    check(n_code_err == 2, "broken code and truncated frame give code errors");
    check(n_rfc_a == 1 && ac_wr == 2 && ac_log[0] == 8'h5A && ac_log[1] == 8'h01, "control write on node A");
    check(n_rfc_b == 1 && bc_wr == 2 && bc_log[0] == 8'h0F, "control write on node B");
    check(n_stretch > 0, "clock stretching happened");
    check(n_b_bus_err == 1 && !b_carrier && b_tx_temp == 8'h00, "receiver node: no sensor, no transmission");
    check(!a_rxv && !a_led, "node A decodes nothing from its silent ADC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
