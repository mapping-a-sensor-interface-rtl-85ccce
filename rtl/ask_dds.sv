// ask_dds: the ASK transmitter, a direct digital synthesizer for the DAC.
//
// A PHASE_BITS phase accumulator advances by FTW every clock; its top
// LUT_BITS bits address a sine table. At the default 25 MHz clock and
// FTW = round(10.7/25 * 2^32) the output is a 10.7 MHz sinusoid, the IF the RF
// front end expects. While enable is low (carrier off) the output is held at
// zero; the accumulator keeps running, so the phase is continuous over gaps.
// Output latency: 2 clocks from enable to dac_data (table read, output
// register). The carrier frequency, the 25 MHz clock and the enable-controlled
// on/off keying follow the design description; accumulator and table sizes are
// this design's choice.
module ask_dds #(
  parameter int          PHASE_BITS = 32,
  parameter int          LUT_BITS   = 10,
  parameter int          AMP_BITS   = 14,
  parameter int unsigned FTW        = 32'd1838246003
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enable,
  output logic signed [AMP_BITS-1:0] dac_data
);
  logic [PHASE_BITS-1:0]       phase;
  logic signed [AMP_BITS-1:0]  sine;
  logic                        en_d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase <= '0;
      en_d  <= 1'b0;
    end else begin
      phase <= phase + PHASE_BITS'(FTW);
      en_d  <= enable;
    end

  sine_rom #(.ADDR_BITS(LUT_BITS), .OUT_BITS(AMP_BITS), .AMP(2**(AMP_BITS-1)-1)) u_rom (
    .clk(clk), .addr(phase[PHASE_BITS-1 -: LUT_BITS]), .cosine(1'b0), .data(sine));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dac_data <= '0;
    else        dac_data <= en_d ? sine : '0;
endmodule
