// i2c_device_model: behavioural model of an I2C slave for the testbenches.
//
// Not synthesizable logic: it stands for the DS1721 temperature sensor, and,
// at another address, for an RF front-end control chip. It watches the bus
// levels (scl, sda) on every clk, answers its 7-bit ADDR with ACK, records
// every byte written to it (wr_log, wr_count), and on a read returns the
// temperature MSB then LSB when the last command byte was 0xAA (DS1721 Read
// Temperature), else 0xFF. It drives the bus only by pulling low (sda_oe,
// scl_oe). With STRETCH > 0 it holds SCL low for STRETCH clocks after each
// falling SCL edge of the acknowledge bit (clock stretching).
module i2c_device_model #(
  parameter logic [6:0] ADDR    = 7'h48,
  parameter int         STRETCH = 0
) (
  input  logic       clk,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_oe,
  output logic       scl_oe,
  input  logic [7:0] temp_msb,
  input  logic [7:0] temp_lsb,
  output logic [7:0] wr_log [16],
  output int         wr_count,
  output int         starts,
  output int         stops,
  output int         reads
);
  logic scl_d = 1'b1, sda_d = 1'b1;
  int   bitn = 0;
  logic [7:0] sh = '0;
  logic selected = 1'b0, reading = 1'b0, addr_phase = 1'b0, in_ack = 1'b0;
  logic [7:0] last_cmd = '0, tx_byte = '0;
  int   byte_idx = 0;
  int   stretch_cnt = 0;

  initial begin
    sda_oe = 1'b0; scl_oe = 1'b0; wr_count = 0; starts = 0; stops = 0; reads = 0;
    for (int i = 0; i < 16; i++) wr_log[i] = '0;
  end

  always @(posedge clk) begin
    scl_d <= scl;
    sda_d <= sda;
    if (stretch_cnt > 0) begin
      stretch_cnt <= stretch_cnt - 1;
      if (stretch_cnt == 1) scl_oe <= 1'b0;
    end
    // START / repeated START
    if (scl && scl_d && sda_d && !sda) begin
      starts <= starts + 1;
      bitn <= 0; addr_phase <= 1'b1; selected <= 1'b0; reading <= 1'b0; in_ack <= 1'b0;
      sda_oe <= 1'b0; byte_idx <= 0;
    end else if (scl && scl_d && !sda_d && sda) begin
      stops <= stops + 1;
      selected <= 1'b0; reading <= 1'b0; addr_phase <= 1'b0; sda_oe <= 1'b0; in_ack <= 1'b0;
    end else if (scl && !scl_d) begin
      // rising SCL: sample a data bit, or the master's ACK/NACK after a read byte
      if (!in_ack) begin
        sh   <= {sh[6:0], sda};
        bitn <= bitn + 1;
      end else if (reading && sda) begin
        reading <= 1'b0;                     // master NACK ends the read
      end
    end else if (!scl && scl_d) begin
      // falling SCL: advance and drive
      if (in_ack) begin
        in_ack <= 1'b0;
        bitn   <= 0;
        sda_oe <= 1'b0;
        if (reading) begin
          tx_byte = (last_cmd == 8'hAA) ? ((byte_idx == 0) ? temp_msb : temp_lsb) : 8'hFF;
          sda_oe  <= !tx_byte[7];
          byte_idx <= byte_idx + 1;
        end
      end else if (bitn == 8) begin
        // eighth bit done: acknowledge phase
        in_ack <= 1'b1;
        if (addr_phase) begin
          addr_phase <= 1'b0;
          if (sh[7:1] == ADDR) begin
            selected <= 1'b1;
            sda_oe   <= 1'b1;
            if (sh[0]) begin reading <= 1'b1; reads <= reads + 1; end
            if (STRETCH > 0) begin scl_oe <= 1'b1; stretch_cnt <= STRETCH; end
          end else
            sda_oe <= 1'b0;
        end else if (selected && !reading) begin
          sda_oe   <= 1'b1;
          last_cmd <= sh;
          if (wr_count < 16) wr_log[wr_count] <= sh;
          wr_count <= wr_count + 1;
        end else
          sda_oe <= 1'b0;                    // master drives its ACK
      end else if (reading && bitn > 0) begin
        sda_oe <= !tx_byte[8 - bitn - 1];
      end
    end
  end
endmodule
