// sine_rom: registered sine/cosine look-up table for the DDS and the receiver NCO.
//
// The table holds 2^ADDR_BITS samples of AMP*sin(2*pi*i/2^ADDR_BITS), rounded to
// the nearest integer and computed at elaboration, so no data file is needed.
// A cosine is read by adding a quarter turn to the address. Output is
// registered: it follows the address by one clock. Table size and amplitude are
// this design's choice.
module sine_rom #(
  parameter int ADDR_BITS = 10,
  parameter int OUT_BITS  = 14,
  parameter int AMP       = 8191
) (
  input  logic                       clk,
  input  logic [ADDR_BITS-1:0]       addr,
  input  logic                       cosine,    // 1: return cos instead of sin
  output logic signed [OUT_BITS-1:0] data
);
  typedef logic signed [OUT_BITS-1:0] lut_t [2**ADDR_BITS];

  function automatic lut_t build();
    lut_t t;
    for (int i = 0; i < 2**ADDR_BITS; i++)
      t[i] = OUT_BITS'(esp_pkg::sine_sample(i, ADDR_BITS, AMP));
    return t;
  endfunction

  localparam lut_t LUT = build();

  logic [ADDR_BITS-1:0] a;
  assign a = addr + (cosine ? ADDR_BITS'(2**(ADDR_BITS-2)) : '0);

  always_ff @(posedge clk) data <= LUT[a];
endmodule
