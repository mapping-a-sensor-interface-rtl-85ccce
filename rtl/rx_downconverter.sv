// rx_downconverter: frequency downconverter of the ASK receiver.
//
// Multiplies each 14-bit ADC sample by the cosine of a local numerically
// controlled oscillator. With the default LO tuning word (10.65 MHz at a
// 25 MHz clock) a 10.7 MHz IF carrier lands at 50 kHz, plus a sum product
// that the following decimator removes. The 28-bit product is scaled by 2^-13
// and registered. Latency: 2 clocks from adc_data to mix_out (table read,
// product register). The 50 kHz baseband and the mixer-then-decimate order
// follow the design description; the low-side LO, a real (not complex) mixer
// and the widths are this design's choice.
module rx_downconverter #(
  parameter int          IN_BITS    = 14,
  parameter int          OUT_BITS   = 16,
  parameter int          PHASE_BITS = 32,
  parameter int          LUT_BITS   = 10,
  parameter int unsigned LO_FTW     = 32'd1829656068
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [IN_BITS-1:0]  adc_data,
  output logic signed [OUT_BITS-1:0] mix_out
);
  localparam int LO_BITS = 14;

  logic [PHASE_BITS-1:0]          phase;
  logic signed [LO_BITS-1:0]      lo;
  logic signed [IN_BITS-1:0]      adc_d;
  logic signed [IN_BITS+LO_BITS-1:0] prod;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase <= '0;
      adc_d <= '0;
    end else begin
      phase <= phase + PHASE_BITS'(LO_FTW);
      adc_d <= adc_data;            // aligns the sample with the table output
    end

  sine_rom #(.ADDR_BITS(LUT_BITS), .OUT_BITS(LO_BITS), .AMP(2**(LO_BITS-1)-1)) u_lo (
    .clk(clk), .addr(phase[PHASE_BITS-1 -: LUT_BITS]), .cosine(1'b1), .data(lo));

  assign prod = adc_d * lo;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mix_out <= '0;
    else        mix_out <= OUT_BITS'(prod >>> (LO_BITS - 1));
endmodule
