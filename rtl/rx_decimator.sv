// rx_decimator: decimate-by-DECIMATION stage of the ASK receiver.
//
// An accumulate-and-dump (boxcar) filter: DECIMATION consecutive input samples
// are summed, and on the last one the sum times round(2^16/DECIMATION) >> 16,
// i.e. the mean, is presented on out_data with a one-clock out_valid pulse.
// With the default factor of 50 this takes the 25 MS/s mixer output to
// 500 kS/s and suppresses the mixer's sum products. Input is taken every
// clock. The factor 50 follows the design description; the boxcar filter and
// the scaling are this design's choice.
module rx_decimator #(
  parameter int DATA_BITS  = 16,
  parameter int DECIMATION = 50
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [DATA_BITS-1:0] in_data,
  output logic signed [DATA_BITS-1:0] out_data,
  output logic                        out_valid
);
  localparam int CNT_BITS = $clog2(DECIMATION);
  localparam int ACC_BITS = DATA_BITS + $clog2(DECIMATION) + 1;
  localparam int SCALE    = (65536 + DECIMATION / 2) / DECIMATION;

  logic [CNT_BITS-1:0]        cnt;
  logic signed [ACC_BITS-1:0] acc, sum;
  logic signed [ACC_BITS+17:0] scaled;

  assign sum    = acc + ACC_BITS'(in_data);
  assign scaled = sum * $signed(18'(SCALE));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (cnt == CNT_BITS'(DECIMATION - 1)) begin
        cnt       <= '0;
        acc       <= '0;
        out_data  <= DATA_BITS'(scaled >>> 16);
        out_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        acc <= sum;
      end
    end
endmodule
