// i2c_master: byte-level I2C bus master, 7-bit addressing, standard mode.
//
// Executes one command at a time: START (a repeated START when the bus is
// already held), WRITE of wdata followed by sampling the slave's ACK
// (ack_err=1 on NACK), READ of one byte followed by an ACK (nack=0) or NACK
// (nack=1) from the master, and STOP. A command is accepted when cmd_valid
// and cmd_ready are both high; done pulses for one clock when it ends, with
// rdata/ack_err valid then. Every bit is four quarter periods of
// CLK_HZ/(4*I2C_HZ) clocks (62 at 25 MHz / 100 kHz, so SCL runs at 100.8 kHz):
// SCL is low in the first two, SDA changes at the start of the second, and
// SCL is high in the last two, at whose end SDA is sampled. START and STOP use
// the same four quarters. The pins are
// open-drain: scl_oe/sda_oe = 1 pulls the line low. The master waits while a
// released SCL is still held low by a slave (clock stretching). The 100 kHz
// rate and 7-bit addressing follow the design description; the command
// interface is this design's own.
module i2c_master #(
  parameter int CLK_HZ = 25_000_000,
  parameter int I2C_HZ = 100_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  esp_pkg::i2c_cmd_e cmd,
  input  logic [7:0]        wdata,
  input  logic              nack,
  output logic              done,
  output logic [7:0]        rdata,
  output logic              ack_err,
  output logic              scl_oe,
  output logic              sda_oe,
  input  logic              scl_i,
  input  logic              sda_i
);
  import esp_pkg::*;

  localparam int QUARTER = CLK_HZ / (4 * I2C_HZ);
  localparam int QW      = $clog2(QUARTER + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_e;

  state_e         state;
  logic [QW-1:0]  qcnt;
  logic [1:0]     q;         // quarter within the current bit or condition
  logic [3:0]     bidx;      // 0..8, bit 8 is the acknowledge
  logic           is_read;
  logic           rd_nack;
  logic [7:0]     sh;        // write data / read data shift register
  logic           scl_low_c, sda_low_c, scl_released;
  logic           q_end;

  // Combinational pin decode from the registered state; registered below.
  always_comb begin
    scl_low_c = scl_oe;
    sda_low_c = sda_oe;
    unique case (state)
      S_IDLE:  ;                                   // hold whatever the last command left
      S_START: begin                               // SCL low, SDA up, SCL up, SDA down
        scl_low_c = (q < 2'd2);
        sda_low_c = (q == 2'd0) ? sda_oe : (q == 2'd3);
      end
      S_BITS: begin                                // SCL low in q0,q1; SDA moves at q1
        scl_low_c = (q < 2'd2);
        if (q == 2'd0)          sda_low_c = sda_oe;
        else if (bidx == 4'd8)  sda_low_c = is_read ? !rd_nack : 1'b0;
        else                    sda_low_c = is_read ? 1'b0 : !sh[7];
      end
      S_STOP: begin                                // SCL low, SDA down, SCL up, SDA up
        scl_low_c = (q < 2'd2);
        sda_low_c = (q == 2'd0) ? sda_oe : (q < 2'd3);
      end
      default: ;
    endcase
  end

  // A quarter in which SCL is released only counts once SCL really is high.
  assign scl_released = !scl_low_c;
  assign q_end        = (qcnt == QW'(QUARTER - 1)) && (!scl_released || scl_i);
  assign cmd_ready    = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_IDLE;
      qcnt    <= '0;
      q       <= '0;
      bidx    <= '0;
      is_read <= 1'b0;
      rd_nack <= 1'b0;
      sh      <= '0;
      done    <= 1'b0;
      rdata   <= '0;
      ack_err <= 1'b0;
      scl_oe  <= 1'b0;
      sda_oe  <= 1'b0;
    end else begin
      done   <= 1'b0;
      scl_oe <= scl_low_c;
      sda_oe <= sda_low_c;
      if (state == S_IDLE) begin
        qcnt <= '0;
        q    <= '0;
        bidx <= '0;
        if (cmd_valid) begin
          unique case (cmd)
            I2C_START: state <= S_START;
            I2C_STOP:  state <= S_STOP;
            I2C_WRITE: begin state <= S_BITS; is_read <= 1'b0; sh <= wdata; ack_err <= 1'b0; end
            I2C_READ:  begin state <= S_BITS; is_read <= 1'b1; rd_nack <= nack; sh <= '0; end
            default:   ;
          endcase
        end
      end else begin
        if (!scl_released || scl_i || qcnt != QW'(QUARTER - 1))
          qcnt <= q_end ? '0 : qcnt + 1'b1;
        if (q_end) begin
          q <= q + 1'b1;
          // sample SDA at the end of the second SCL-high quarter
          if (state == S_BITS && q == 2'd2) begin
            if (bidx == 4'd8) begin
              if (!is_read) ack_err <= sda_i;
            end else if (is_read)
              sh <= {sh[6:0], sda_i};
          end
          if (q == 2'd3) begin
            if (state == S_BITS && bidx != 4'd8) begin
              bidx <= bidx + 1'b1;
              if (!is_read) sh <= {sh[6:0], 1'b0};
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
              if (state == S_BITS && is_read) rdata <= sh;
            end
          end
        end
      end
    end

  // While SCL is released during a data bit, SDA must not change.
  a_sda_stable: assert property (@(posedge clk)
    (state == S_BITS && q == 2'd3 && !scl_oe && $past(!scl_oe)) |-> $stable(sda_oe));

  // Commands are only offered while the master is idle.
  a_cmd_when_ready: assert property (@(posedge clk) cmd_valid |-> cmd_ready);
endmodule
