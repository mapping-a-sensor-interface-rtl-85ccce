// tb_i2c_master: runs the I2C master against two device models on one
// open-drain bus: a DS1721 at 0x48 and a control chip at 0x2C that stretches
// the clock. Checks written bytes arrive, a read returns the model's
// temperature bytes, a NACK from an absent address sets ack_err, START/STOP
// counts, the SCL period of 248 clocks (100.8 kHz at 25 MHz) and that a
// stretched acknowledge makes the byte longer without corrupting it.
module tb_i2c_master;
  timeunit 1ns; timeprecision 1ps;
  import esp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, nack = 1'b0, done, ack_err;
  i2c_cmd_e cmd = I2C_STOP;
  logic [7:0] wdata = '0, rdata;
  logic m_scl_oe, m_sda_oe, s_sda_oe, s_scl_oe, c_sda_oe, c_scl_oe, scl, sda;
  logic [7:0] s_log [16], c_log [16];
  int s_wr, s_st, s_sp, s_rd, c_wr, c_st, c_sp, c_rd;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;
  assign scl = !(m_scl_oe | s_scl_oe | c_scl_oe);
  assign sda = !(m_sda_oe | s_sda_oe | c_sda_oe);

  i2c_master dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wdata, .nack, .done, .rdata, .ack_err,
                  .scl_oe(m_scl_oe), .sda_oe(m_sda_oe), .scl_i(scl), .sda_i(sda));
  i2c_device_model #(.ADDR(7'h48)) sensor (.clk, .scl, .sda, .sda_oe(s_sda_oe), .scl_oe(s_scl_oe),
      .temp_msb(8'h1B), .temp_lsb(8'h80), .wr_log(s_log), .wr_count(s_wr), .starts(s_st), .stops(s_sp), .reads(s_rd));
  i2c_device_model #(.ADDR(7'h2C), .STRETCH(300)) ctrl (.clk, .scl, .sda, .sda_oe(c_sda_oe), .scl_oe(c_scl_oe),
      .temp_msb(8'h00), .temp_lsb(8'h00), .wr_log(c_log), .wr_count(c_wr), .starts(c_st), .stops(c_sp), .reads(c_rd));

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // SCL period measurement
  int last_rise = 0, period = 0;
  logic scl_d = 1'b1;
  always @(posedge clk) begin
    scl_d <= scl;
    if (scl && !scl_d) begin period <= cyc - last_rise; last_rise <= cyc; end
  end

  task automatic do_cmd(input i2c_cmd_e c, input logic [7:0] d, input logic nk, output int took);
    int t0;
    while (!cmd_ready) @(negedge clk);
    cmd = c; wdata = d; nack = nk; cmd_valid = 1'b1; t0 = cyc;
    @(negedge clk); cmd_valid = 1'b0;
    while (!done) @(negedge clk);
    took = cyc - t0;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t, t_plain, t_stretch;
    repeat (4) @(negedge clk); rst_n = 1'b1;
    repeat (4) @(negedge clk);
    // write 0x51 to the sensor
    do_cmd(I2C_START, 8'h00, 1'b0, t);
    do_cmd(I2C_WRITE, 8'h90, 1'b0, t_plain); check(!ack_err, "sensor address ACK");
    check(period == 248, $sformatf("SCL period %0d", period));
    do_cmd(I2C_WRITE, 8'h51, 1'b0, t); check(!ack_err, "command ACK");
    do_cmd(I2C_STOP, 8'h00, 1'b0, t);
    repeat (10) @(negedge clk);
    check(s_wr == 1 && s_log[0] == 8'h51, "sensor got 0x51");
    check(s_st == 1 && s_sp == 1, "one START and one STOP seen");
    check(scl && sda, "bus released after STOP");
    // read temperature: pointer 0xAA, repeated START, two bytes
    do_cmd(I2C_START, 8'h00, 1'b0, t);
    do_cmd(I2C_WRITE, 8'h90, 1'b0, t);
    do_cmd(I2C_WRITE, 8'hAA, 1'b0, t);
    do_cmd(I2C_START, 8'h00, 1'b0, t);
    do_cmd(I2C_WRITE, 8'h91, 1'b0, t); check(!ack_err, "read address ACK");
    do_cmd(I2C_READ, 8'h00, 1'b0, t); check(rdata == 8'h1B, $sformatf("MSB %h", rdata));
    do_cmd(I2C_READ, 8'h00, 1'b1, t); check(rdata == 8'h80, $sformatf("LSB %h", rdata));
    do_cmd(I2C_STOP, 8'h00, 1'b0, t);
    check(s_st == 3 && s_rd == 1, "repeated START seen");
    // absent address
    do_cmd(I2C_START, 8'h00, 1'b0, t);
    do_cmd(I2C_WRITE, 8'hA0, 1'b0, t); check(ack_err, "NACK from absent device");
    do_cmd(I2C_STOP, 8'h00, 1'b0, t);
    // clock-stretching control chip
    do_cmd(I2C_START, 8'h00, 1'b0, t);
    do_cmd(I2C_WRITE, 8'h58, 1'b0, t_stretch); check(!ack_err, "control chip ACK");
    do_cmd(I2C_WRITE, 8'h3C, 1'b0, t);
    do_cmd(I2C_WRITE, 8'hC3, 1'b0, t);
    do_cmd(I2C_STOP, 8'h00, 1'b0, t);
    repeat (10) @(negedge clk);
    check(c_wr == 2 && c_log[0] == 8'h3C && c_log[1] == 8'hC3, "control chip got 3C C3");
    check(t_stretch > t_plain + 100, $sformatf("stretched byte %0d vs %0d clocks", t_stretch, t_plain));
    check(s_wr == 2, "sensor saw only its own writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
