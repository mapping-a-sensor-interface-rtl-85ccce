// esp_top: one node of the Extensible Sensor Platform.
//
// Everything digital of a wireless sensor node in one FPGA: an ASK transmitter
// (a DDS at the 10.7 MHz IF feeding the DAC), a non-coherent ASK receiver
// (downconvert, decimate by 50, envelope, lowpass, threshold) fed by the ADC,
// an I2C master on the bus shared by the temperature sensor and the RF front
// end's control devices, and two 32-bit timers. Hardware controllers take the
// place of the control program of the original soft processor:
//
//   role_rx = 0  sensor transmitter: every SAMPLE_PERIOD_CYCLES (2 s) the
//                sensor_sampler reads the sensor's temperature MSB, and the
//                ask_frame_encoder sends it as sync word + 8 coded bits by
//                switching the DDS on and off on the sub-bit timer.
//   role_rx = 1  receiver: the ask_frame_decoder scans the receiver's bit
//                stream, checks the sync word, decodes the byte and sets led.
//
// The sub-bit timer serves whichever controller the role selects, the sample
// timer runs only in the transmitter role (parked while role_rx is high, and
// started afresh one period before the first reading after reset or a role
// change to transmitter). Leaving the transmitter role ends a frame in
// progress with the carrier off; leaving the receiver role abandons a frame
// being read. A node in the receiver role never keys its carrier (checked by
// an assertion). RF front-end control writes (rfc_*) are served
// in either role. I2C pins are open-drain: *_oe = 1 pulls the line low; the
// pads and pull-ups are outside. The 25 MHz ADC/DAC sample clock is clk.
module esp_top #(
  parameter int                CLK_HZ               = 25_000_000,
  parameter int                I2C_HZ               = 100_000,
  parameter int                SAMPLE_PERIOD_CYCLES = 50_000_000,
  parameter int                SUB_BIT_CYCLES       = 9375,
  parameter int                DECIMATION           = 50,
  parameter logic [6:0]        SENSOR_ADDR          = 7'h48,
  parameter logic signed [7:0] LED_THRESHOLD        = 8'sd25
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               role_rx,
  // converters
  input  logic signed [13:0] adc_data,
  output logic signed [13:0] dac_data,
  // I2C bus
  input  logic               i2c_scl_i,
  input  logic               i2c_sda_i,
  output logic               i2c_scl_oe,
  output logic               i2c_sda_oe,
  // receiver setting
  input  logic signed [17:0] rx_threshold,
  // RF front-end control write
  input  logic               rfc_req,
  input  logic [6:0]         rfc_addr,
  input  logic [15:0]        rfc_data,
  output logic               rfc_busy,
  output logic               rfc_done,
  // transmitter status
  output logic [7:0]         tx_temp,
  output logic               tx_temp_valid,
  output logic               sensor_err,
  output logic               tx_busy,
  output logic               carrier_on,
  // receiver status
  output logic               rx_bit,
  output logic signed [17:0] rx_level,
  output logic [7:0]         rx_temp,
  output logic               rx_valid,
  output logic               rx_sync_err,
  output logic               rx_code_err,
  output logic               led
);
  import esp_pkg::*;

  // ---------------- timers ----------------
  logic        sample_tick, sub_tick;
  logic        sub_load;
  logic [31:0] sub_load_value, sub_reload_value;
  logic [31:0] sample_count, sub_count;
  logic        role_d, first;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      role_d <= 1'b1;
      first  <= 1'b1;
    end else begin
      role_d <= role_rx;
      first  <= 1'b0;
    end

  esp_timer #(.WIDTH(32)) u_sample_timer (
    .clk, .rst_n,
    .en(!role_rx),
    .load(role_rx || first || role_d),
    .load_value(32'(SAMPLE_PERIOD_CYCLES - 2)),
    .reload_value(32'(SAMPLE_PERIOD_CYCLES - 1)),
    .tick(sample_tick), .count(sample_count));

  esp_timer #(.WIDTH(32)) u_sub_timer (
    .clk, .rst_n,
    .en(1'b1),
    .load(sub_load),
    .load_value(sub_load_value),
    .reload_value(sub_reload_value),
    .tick(sub_tick), .count(sub_count));

  // ---------------- I2C ----------------
  logic       m_valid, m_ready, m_nack, m_done, m_ack_err;
  i2c_cmd_e   m_cmd;
  logic [7:0] m_wdata, m_rdata;

  i2c_master #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) u_i2c (
    .clk, .rst_n,
    .cmd_valid(m_valid), .cmd_ready(m_ready), .cmd(m_cmd), .wdata(m_wdata), .nack(m_nack),
    .done(m_done), .rdata(m_rdata), .ack_err(m_ack_err),
    .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe), .scl_i(i2c_scl_i), .sda_i(i2c_sda_i));

  sensor_sampler #(.SENSOR_ADDR(SENSOR_ADDR)) u_sampler (
    .clk, .rst_n,
    .sample_tick(sample_tick && !role_rx),
    .temp(tx_temp), .temp_valid(tx_temp_valid), .bus_err(sensor_err),
    .rfc_req, .rfc_addr, .rfc_data, .rfc_busy, .rfc_done,
    .m_valid, .m_ready, .m_cmd, .m_wdata, .m_nack, .m_done, .m_rdata, .m_ack_err);

  // ---------------- transmitter ----------------
  logic        enc_load, enc_done;
  logic [31:0] enc_lv, enc_rv;

  ask_frame_encoder #(.SUB_BIT_CYCLES(SUB_BIT_CYCLES)) u_encoder (
    .clk, .rst_n, .cancel(role_rx),
    .send(tx_temp_valid && !role_rx), .data(tx_temp),
    .sub_tick(sub_tick && !role_rx),
    .timer_load(enc_load), .timer_load_value(enc_lv), .timer_reload_value(enc_rv),
    .carrier_on, .busy(tx_busy), .done(enc_done));

  ask_dds u_dds (.clk, .rst_n, .enable(carrier_on), .dac_data);

  // ---------------- receiver ----------------
  logic signed [15:0] mix_out, dec_out;
  logic        [15:0] env_out;
  logic               dec_valid, lpf_valid;
  logic               dec_load, dec_busy;
  logic [31:0]        dec_lv, dec_rv;

  ask_receiver #(.ADC_BITS(14), .DECIMATION(DECIMATION)) u_rx (
    .clk, .rst_n, .adc_data, .threshold(rx_threshold),
    .mix_out, .dec_out, .dec_valid, .env_out, .lpf_out(rx_level), .lpf_valid, .rx_bit);

  ask_frame_decoder #(.SUB_BIT_CYCLES(SUB_BIT_CYCLES), .LED_THRESHOLD(LED_THRESHOLD)) u_decoder (
    .clk, .rst_n, .enable(role_rx), .rx_bit,
    .sub_tick(sub_tick && role_rx),
    .timer_load(dec_load), .timer_load_value(dec_lv), .timer_reload_value(dec_rv),
    .busy(dec_busy), .temp(rx_temp), .valid(rx_valid),
    .sync_err(rx_sync_err), .code_err(rx_code_err), .led);

  // The sub-bit timer belongs to the controller of the selected role.
  assign sub_load         = role_rx ? dec_load : enc_load;
  assign sub_load_value   = role_rx ? dec_lv   : enc_lv;
  assign sub_reload_value = role_rx ? dec_rv   : enc_rv;
  a_receiver_silent: assert property (@(posedge clk) (role_rx && role_d) |-> !carrier_on);
endmodule
