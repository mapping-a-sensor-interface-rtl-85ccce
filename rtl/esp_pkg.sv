// esp_pkg: constants and types shared by the Extensible Sensor Platform node.
//
// Holds the ASK line code (the 13-sub-bit sync word and the 6-sub-bit codes
// for data '0' and '1', read MSB-first in time), the lowpass FIR coefficients,
// the DS1721 command bytes and the I2C master command encoding.
//
// The sync word and bit codes follow the bit-encoding and synchronisation
// figure of the design: sub-bit 0 is sent first, 1 = carrier on. The FIR
// coefficients are this design's own: an order-50 (51-tap) Parks-McClellan
// equiripple lowpass for a 500 kS/s input, passband 0-10 kHz, stopband from
// 50 kHz with stopband weight 10, rounded to Q15 (DC gain 32733/32768). Only
// the 26 unique taps of the symmetric impulse response are stored; tap k and
// tap 50-k are equal. The DS1721 command codes come from that part's data
// sheet.
package esp_pkg;

  // ---------------- ASK line code ----------------
  localparam int SYNC_LEN   = 13;
  localparam int CODE_LEN   = 6;
  localparam int DATA_BITS  = 8;
  localparam int FRAME_LEN  = SYNC_LEN + CODE_LEN * DATA_BITS;   // 61 sub-bits

  // Index [LEN-1] is transmitted first.
  localparam logic [SYNC_LEN-1:0] SYNC_WORD = 13'b1011001011001;
  localparam logic [CODE_LEN-1:0] CODE_ZERO = 6'b011011;
  localparam logic [CODE_LEN-1:0] CODE_ONE  = 6'b001001;

  // Whole frame for one data byte, sent MSB first, first sub-bit at [FRAME_LEN-1].
  function automatic logic [FRAME_LEN-1:0] ask_frame(input logic [7:0] data);
    logic [FRAME_LEN-1:0] f;
    f = '0;
    f[FRAME_LEN-1 -: SYNC_LEN] = SYNC_WORD;
    for (int b = 0; b < DATA_BITS; b++)
      f[CODE_LEN*(DATA_BITS-b)-1 -: CODE_LEN] = data[DATA_BITS-1-b] ? CODE_ONE : CODE_ZERO;
    return f;
  endfunction

  // ---------------- receiver lowpass ----------------
  localparam int FIR_TAPS   = 51;
  localparam int FIR_HALF   = 26;          // unique taps, index 25 is the centre
  localparam int COEF_BITS  = 16;
  localparam int COEF_FRAC  = 15;
  typedef logic signed [COEF_BITS-1:0] coef_t;
  localparam coef_t FIR_COEF [FIR_HALF] = '{
      16'sd6,    16'sd12,   16'sd23,   16'sd34,   16'sd44,   16'sd47,
      16'sd38,   16'sd12,  -16'sd37,  -16'sd107, -16'sd195, -16'sd287,
     -16'sd366, -16'sd408, -16'sd386, -16'sd275, -16'sd57,   16'sd276,
      16'sd718,  16'sd1247,  16'sd1826, 16'sd2407, 16'sd2936, 16'sd3360,
      16'sd3634, 16'sd3729 };

  // ---------------- DS1721 ----------------
  localparam logic [7:0] DS1721_START_CONVERT = 8'h51;
  localparam logic [7:0] DS1721_READ_TEMP     = 8'hAA;

  // ---------------- I2C master commands ----------------
  typedef enum logic [2:0] {
    I2C_START = 3'd0,   // START, or repeated START when the bus is held
    I2C_WRITE = 3'd1,   // write wdata, sample ACK
    I2C_READ  = 3'd2,   // read a byte, then ACK (nack=0) or NACK (nack=1)
    I2C_STOP  = 3'd3
  } i2c_cmd_e;

  // Sine of phase p/2^N, amplitude AMP, rounded; used to build DDS/NCO tables.
  function automatic int sine_sample(input int p, input int n, input int amp);
    real ph;
    ph = 2.0 * 3.14159265358979 * real'(p) / (2.0 ** n);
    return $rtoi($floor(real'(amp) * $sin(ph) + 0.5));
  endfunction

endpackage
