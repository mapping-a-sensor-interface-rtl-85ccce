// sensor_sampler: I2C transaction sequencer of the sensor transmitter node.
//
// Does the bus work that the node's control program does: once after reset it
// sends the DS1721 "Start Convert" command (START, addr+W, 0x51, STOP); on
// every sample_tick it reads the most significant temperature byte (START,
// addr+W, 0xAA, repeated START, addr+R, one byte answered with NACK, STOP) and
// presents it on temp with a one-clock temp_valid; and on rfc_req it writes
// two bytes to an RF front-end control device at rfc_addr (START, addr+W,
// rfc_data[15:8], rfc_data[7:0], STOP). rfc_busy is high from the request to
// the end of that write. A request arriving while a transaction runs waits;
// pending work is served in the order Start Convert, RF control, sensor read.
// A NACK from a slave ends the transaction with STOP and pulses bus_err
// instead of temp_valid. At 100 kHz the sensor read takes about 390 us.
// Reading the top 8 temperature bits every sampling interval, and sharing the
// bus with the front-end control devices, follow the design description;
// the DS1721 command bytes come from that part's data sheet, the two-byte
// control write is this design's own.
module sensor_sampler #(
  parameter logic [6:0] SENSOR_ADDR = 7'h48
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample_tick,
  output logic [7:0]        temp,
  output logic              temp_valid,
  output logic              bus_err,
  input  logic              rfc_req,
  input  logic [6:0]        rfc_addr,
  input  logic [15:0]       rfc_data,
  output logic              rfc_busy,
  output logic              rfc_done,
  // to i2c_master
  output logic              m_valid,
  input  logic              m_ready,
  output esp_pkg::i2c_cmd_e m_cmd,
  output logic [7:0]        m_wdata,
  output logic              m_nack,
  input  logic              m_done,
  input  logic [7:0]        m_rdata,
  input  logic              m_ack_err
);
  import esp_pkg::*;

  typedef enum logic [1:0] {T_CONVERT, T_READ, T_RFC} txn_e;
  typedef struct packed {
    i2c_cmd_e   cmd;
    logic [7:0] wdata;
    logic       nack;
    logic       last;
  } step_t;

  logic       busy, issued;
  txn_e       txn;
  logic [2:0] step;
  logic       pend_conv, pend_read, pend_rfc;
  logic [6:0] rfc_addr_q;
  logic [15:0] rfc_data_q;
  logic       err;
  step_t      cur;

  // The command list of each transaction.
  always_comb begin
    cur = '{cmd: I2C_STOP, wdata: 8'h00, nack: 1'b0, last: 1'b1};
    unique case (txn)
      T_CONVERT: unique case (step)
        3'd0: cur = '{I2C_START, 8'h00, 1'b0, 1'b0};
        3'd1: cur = '{I2C_WRITE, {SENSOR_ADDR, 1'b0}, 1'b0, 1'b0};
        3'd2: cur = '{I2C_WRITE, DS1721_START_CONVERT, 1'b0, 1'b0};
        default: ;
      endcase
      T_READ: unique case (step)
        3'd0: cur = '{I2C_START, 8'h00, 1'b0, 1'b0};
        3'd1: cur = '{I2C_WRITE, {SENSOR_ADDR, 1'b0}, 1'b0, 1'b0};
        3'd2: cur = '{I2C_WRITE, DS1721_READ_TEMP, 1'b0, 1'b0};
        3'd3: cur = '{I2C_START, 8'h00, 1'b0, 1'b0};
        3'd4: cur = '{I2C_WRITE, {SENSOR_ADDR, 1'b1}, 1'b0, 1'b0};
        3'd5: cur = '{I2C_READ, 8'h00, 1'b1, 1'b0};
        default: ;
      endcase
      T_RFC: unique case (step)
        3'd0: cur = '{I2C_START, 8'h00, 1'b0, 1'b0};
        3'd1: cur = '{I2C_WRITE, {rfc_addr_q, 1'b0}, 1'b0, 1'b0};
        3'd2: cur = '{I2C_WRITE, rfc_data_q[15:8], 1'b0, 1'b0};
        3'd3: cur = '{I2C_WRITE, rfc_data_q[7:0], 1'b0, 1'b0};
        default: ;
      endcase
      default: ;
    endcase
  end

  assign m_valid  = busy && !issued && m_ready;
  assign m_cmd    = cur.cmd;
  assign m_wdata  = cur.wdata;
  assign m_nack   = cur.nack;
  assign rfc_busy = pend_rfc || (busy && txn == T_RFC);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy       <= 1'b0;
      issued     <= 1'b0;
      txn        <= T_CONVERT;
      step       <= '0;
      pend_conv  <= 1'b1;
      pend_read  <= 1'b0;
      pend_rfc   <= 1'b0;
      rfc_addr_q <= '0;
      rfc_data_q <= '0;
      err        <= 1'b0;
      temp       <= '0;
      temp_valid <= 1'b0;
      bus_err    <= 1'b0;
      rfc_done   <= 1'b0;
    end else begin
      temp_valid <= 1'b0;
      bus_err    <= 1'b0;
      rfc_done   <= 1'b0;
      if (sample_tick) pend_read <= 1'b1;
      if (rfc_req && !rfc_busy) begin
        pend_rfc   <= 1'b1;
        rfc_addr_q <= rfc_addr;
        rfc_data_q <= rfc_data;
      end

      if (!busy) begin
        step   <= '0;
        issued <= 1'b0;
        err    <= 1'b0;
        if (pend_conv)      begin busy <= 1'b1; txn <= T_CONVERT; pend_conv <= 1'b0; end
        else if (pend_rfc)  begin busy <= 1'b1; txn <= T_RFC;     pend_rfc  <= 1'b0; end
        else if (pend_read) begin busy <= 1'b1; txn <= T_READ;    pend_read <= 1'b0; end
      end else begin
        if (m_valid) issued <= 1'b1;
        if (m_done) begin
          issued <= 1'b0;
          if (cur.last) begin
            busy <= 1'b0;
            if (err) bus_err <= 1'b1;
            else if (txn == T_READ) temp_valid <= 1'b1;
            if (txn == T_RFC) rfc_done <= 1'b1;
          end else if (cur.cmd == I2C_WRITE && m_ack_err) begin
            err  <= 1'b1;
            step <= 3'd7;                    // go straight to STOP
          end else begin
            step <= step + 1'b1;
            if (cur.cmd == I2C_READ) temp <= m_rdata;
          end
        end
      end
    end
endmodule
