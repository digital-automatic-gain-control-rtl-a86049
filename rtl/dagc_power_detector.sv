// dagc_power_detector: running average of the digitised RSSI.
//
// Implements the first-order recursive average
//     y(i+1) = (1 - a) * y(i) + a * x(i),   a = 2^-m
// as y += (x - y) >>> m, so the only arithmetic is one subtraction, one
// barrel shift and one addition. A small m tracks fast changes, a large m
// averages strongly; m is a run-time input from the control registers. The
// recursion and the power-of-two alpha are the design's; keeping FRAC
// fraction bits in the state (so that large m does not stall the average a
// whole RSSI step away from its input), truncating the shift toward minus
// infinity, rounding the output to the nearest integer and clearing the state
// at reset are this implementation's choices.
//
// Interface: one RSSI sample is taken on each clock where in_valid is high.
// Timing: pn and out_valid are registered; pn reflects the sample given one
// cycle earlier (latency 1, one sample per cycle).
module dagc_power_detector
#(
  parameter int unsigned RSSI_W = dagc_pkg::RSSI_W,
  parameter int unsigned M_W    = dagc_pkg::M_W,
  parameter int unsigned FRAC   = dagc_pkg::AVG_FRAC
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [RSSI_W-1:0] rssi,
  input  logic [M_W-1:0]    m,
  output logic              out_valid,
  output logic [RSSI_W-1:0] pn
);

  localparam int unsigned Y_W = RSSI_W + FRAC;

  logic        [Y_W-1:0] y_q, y_d;
  logic signed [Y_W:0]   diff, step;
  logic        [M_W-1:0] m_eff;
  logic        [Y_W:0]   y_round;

  // A shift beyond the fraction width would only lose resolution.
  assign m_eff = (32'(m) > FRAC) ? M_W'(FRAC) : m;

  always_comb begin
    diff = $signed({1'b0, rssi, {FRAC{1'b0}}}) - $signed({1'b0, y_q});
    step = diff >>> m_eff;
    y_d  = Y_W'($signed({1'b0, y_q}) + step);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_q       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_q <= y_d;
    end
  end

  // Round the average to an integer RSSI value, saturating at full scale.
  always_comb begin
    y_round = {1'b0, y_q} + (Y_W+1)'(1 << (FRAC - 1));
    if (y_round[Y_W]) pn = '1;
    else              pn = y_round[Y_W-1:FRAC];
  end

endmodule
