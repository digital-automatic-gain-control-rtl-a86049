// rssi_adc_model: behavioural 10-bit parallel A/D converter for the RSSI
// voltage, for testbenches only (not synthesizable logic).
//
// Samples vin on every rising clock edge and outputs round(vin / LSB_V) plus
// a uniform noise of up to +/- NOISE_LSB codes, clipped to 0 .. 1023. The
// code is registered, so it appears one clock after the edge it was taken on,
// with valid high.
module rssi_adc_model #(
  parameter real LSB_V     = 0.002,
  parameter int  NOISE_LSB = 2
) (
  input  logic       clk,
  input  real        vin,
  output logic       valid,
  output logic [9:0] code
);

  initial begin
    valid = 1'b0;
    code  = '0;
  end

  always_ff @(posedge clk) begin
    int c;
    c = $rtoi(vin / LSB_V + 0.5);
    if (NOISE_LSB > 0) c += $urandom_range(0, 2 * NOISE_LSB) - NOISE_LSB;
    if (c < 0) c = 0;
    if (c > 1023) c = 1023;
    code  <= 10'(c);
    valid <= 1'b1;
  end

endmodule
