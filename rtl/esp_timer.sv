// esp_timer: 32-bit down-counting interval timer with auto-reload.
//
// The node uses two of these, as the processor subsystem of the design does:
// one sets the 2 s sensor sampling interval, the other the 375 us sub-bit
// timing of the ASK line code. load copies load_value into the counter; with
// en high the counter then decrements every clock, and when it is zero the
// next clock raises tick for one cycle and reloads reload_value. So the first
// tick comes load_value+2 clocks after the load cycle and later ticks every
// reload_value+1 clocks. The register interface of the original timer core is
// not used; this load/reload scheme is this design's own.
module esp_timer #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             load,
  input  logic [WIDTH-1:0] load_value,
  input  logic [WIDTH-1:0] reload_value,
  output logic             tick,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (load)
        count <= load_value;
      else if (en) begin
        if (count == '0) begin
          count <= reload_value;
          tick  <= 1'b1;
        end else
          count <= count - 1'b1;
      end
    end
endmodule
