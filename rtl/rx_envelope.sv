// rx_envelope: absolute-value envelope detector of the ASK receiver.
//
// Each valid input sample is multiplied by -1 when negative and passed
// unchanged otherwise, as the design description specifies; the result is
// registered with its valid strobe (1 clock latency). The most negative input
// value, whose negation does not fit, saturates to the largest positive value
// (this design's choice).
module rx_envelope #(
  parameter int DATA_BITS = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [DATA_BITS-1:0] in_data,
  input  logic                        in_valid,
  output logic        [DATA_BITS-1:0] out_data,
  output logic                        out_valid
);
  localparam logic signed [DATA_BITS-1:0] MOST_NEG = {1'b1, {(DATA_BITS-1){1'b0}}};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (in_data == MOST_NEG)  out_data <= {1'b0, {(DATA_BITS-1){1'b1}}};
        else if (in_data < 0)     out_data <= DATA_BITS'(-in_data);
        else                      out_data <= DATA_BITS'(in_data);
      end
    end
endmodule
