// tb_sensor_sampler: the sampler with an I2C master, a DS1721 model (0x48)
// and a control-chip model (0x2C) on one bus. Checks: Start Convert (0x51)
// after reset; a sample_tick gives temp_valid with the sensor's MSB about
// 400 us later (9000..10500 clocks); a control write delivers both bytes and
// pulses rfc_done; a tick and a control request together are both served; and
// a second sampler whose sensor address nobody answers reports bus_err.
module tb_sensor_sampler;
  timeunit 1ns; timeprecision 1ps;
  import esp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  // ---- unit under test on bus A ----
  logic tick = 1'b0, tv, berr, rfc_req = 1'b0, rfc_busy, rfc_done;
  logic [7:0] temp;
  logic [6:0] rfc_addr = 7'h2C;
  logic [15:0] rfc_data = 16'h0000;
  logic m_valid, m_ready, m_nack, m_done, m_ack_err;
  i2c_cmd_e m_cmd;
  logic [7:0] m_wdata, m_rdata;
  logic scl_oe, sda_oe, s_sda, s_scl, c_sda, c_scl, scl, sda;
  logic [7:0] s_log [16], c_log [16];
  int s_wr, s_st, s_sp, s_rd, c_wr, c_st, c_sp, c_rd;
  logic [7:0] sensor_msb = 8'h1B;

  assign scl = !(scl_oe | s_scl | c_scl);
  assign sda = !(sda_oe | s_sda | c_sda);

  sensor_sampler dut (.clk, .rst_n, .sample_tick(tick), .temp, .temp_valid(tv), .bus_err(berr),
      .rfc_req, .rfc_addr, .rfc_data, .rfc_busy, .rfc_done,
      .m_valid, .m_ready, .m_cmd, .m_wdata, .m_nack, .m_done, .m_rdata, .m_ack_err);
  i2c_master u_m (.clk, .rst_n, .cmd_valid(m_valid), .cmd_ready(m_ready), .cmd(m_cmd), .wdata(m_wdata),
      .nack(m_nack), .done(m_done), .rdata(m_rdata), .ack_err(m_ack_err),
      .scl_oe, .sda_oe, .scl_i(scl), .sda_i(sda));
  i2c_device_model #(.ADDR(7'h48)) sensor (.clk, .scl, .sda, .sda_oe(s_sda), .scl_oe(s_scl),
      .temp_msb(sensor_msb), .temp_lsb(8'h00), .wr_log(s_log), .wr_count(s_wr), .starts(s_st), .stops(s_sp), .reads(s_rd));
  i2c_device_model #(.ADDR(7'h2C)) ctrl (.clk, .scl, .sda, .sda_oe(c_sda), .scl_oe(c_scl),
      .temp_msb(8'h00), .temp_lsb(8'h00), .wr_log(c_log), .wr_count(c_wr), .starts(c_st), .stops(c_sp), .reads(c_rd));

  // ---- second sampler on bus B, sensor address not present ----
  logic tv2, berr2, rb2, rd2;
  logic [7:0] temp2;
  logic v2, r2, n2, d2, e2;
  i2c_cmd_e c2;
  logic [7:0] w2, q2;
  logic scl2_oe, sda2_oe, s2_sda, s2_scl, scl2, sda2;
  logic [7:0] s2_log [16];
  int s2_wr, s2_st, s2_sp, s2_rd;
  assign scl2 = !(scl2_oe | s2_scl);
  assign sda2 = !(sda2_oe | s2_sda);
  sensor_sampler #(.SENSOR_ADDR(7'h49)) dut2 (.clk, .rst_n, .sample_tick(tick), .temp(temp2), .temp_valid(tv2),
      .bus_err(berr2), .rfc_req(1'b0), .rfc_addr(7'h00), .rfc_data(16'h0), .rfc_busy(rb2), .rfc_done(rd2),
      .m_valid(v2), .m_ready(r2), .m_cmd(c2), .m_wdata(w2), .m_nack(n2), .m_done(d2), .m_rdata(q2), .m_ack_err(e2));
  i2c_master u_m2 (.clk, .rst_n, .cmd_valid(v2), .cmd_ready(r2), .cmd(c2), .wdata(w2), .nack(n2), .done(d2),
      .rdata(q2), .ack_err(e2), .scl_oe(scl2_oe), .sda_oe(sda2_oe), .scl_i(scl2), .sda_i(sda2));
  i2c_device_model #(.ADDR(7'h48)) sensor2 (.clk, .scl(scl2), .sda(sda2), .sda_oe(s2_sda), .scl_oe(s2_scl),
      .temp_msb(8'h55), .temp_lsb(8'h00), .wr_log(s2_log), .wr_count(s2_wr), .starts(s2_st), .stops(s2_sp), .reads(s2_rd));

  int n_tv = 0, n_berr2 = 0, n_tv2 = 0, n_rfc_done = 0;
  logic [7:0] last_temp;
  always @(posedge clk) if (rst_n) begin
    if (tv) begin n_tv++; last_temp = temp; end
    if (tv2) n_tv2++;
    if (berr2) n_berr2++;
    if (rfc_done) n_rfc_done++;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_tick();
    @(negedge clk); tick = 1'b1; @(negedge clk); tick = 1'b0;
  endtask

  initial begin
    int t;
    repeat (4) @(negedge clk); rst_n = 1'b1;
    repeat (6000) @(negedge clk);
    check(s_wr == 1 && s_log[0] == 8'h51, "Start Convert after reset");
    check(n_berr2 == 1, "Start Convert to absent sensor reports bus_err");
    // one reading, timed
    pulse_tick();
    t = 0;
    while (!tv && t < 20000) begin @(negedge clk); t++; end
    check(tv && temp == 8'h1B, $sformatf("temperature %h", temp));
    check(t > 9000 && t < 10500, $sformatf("read took %0d clocks", t));
    $display("sensor read took %0d clocks (%0d us)", t, t / 25);
    // control write
    @(negedge clk); rfc_data = 16'hA5C3; rfc_req = 1'b1; @(negedge clk); rfc_req = 1'b0;
    check(rfc_busy, "rfc_busy after request");
    repeat (8000) @(negedge clk);
    check(c_wr == 2 && c_log[0] == 8'hA5 && c_log[1] == 8'hC3, "control bytes delivered");
    check(n_rfc_done == 1 && !rfc_busy, "rfc_done");
    // both at once, with a new temperature
    sensor_msb = 8'hF6;                            // -10 degrees
    @(negedge clk); rfc_data = 16'h1234; rfc_req = 1'b1; tick = 1'b1;
    @(negedge clk); rfc_req = 1'b0; tick = 1'b0;
    repeat (20000) @(negedge clk);
    check(c_wr == 4 && c_log[2] == 8'h12 && c_log[3] == 8'h34, "second control write");
    check(n_tv == 2 && last_temp == 8'hF6, "second reading");
    check(n_tv2 == 0 && n_berr2 == 3, "absent sensor: no temp_valid, bus_err each time");
    check(scl && sda && scl2 && sda2, "buses idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
