// dagc_power_calc: linear power estimate from the averaged RSSI.
//
// Computes Pc = Beta * Pn + A0 with one signed multiplier and one adder.
// Beta (slope) and A0 (offset) are programmable signed fixed-point values
// with COEF_FRAC fraction bits; Pn is the unsigned averaged RSSI, so Pc
// carries COEF_FRAC fraction bits too. The equation and the single
// multiplier are the design's; the widths and the fixed-point format are
// this implementation's (see dagc_pkg). With the usual calibration Pc is
// the VGA gain, in VGA steps, that the measured signal needs at the highest
// LNA setting.
//
// Interface: in_valid/pn in, out_valid/pc out.
// Timing: one register stage, latency 1, one estimate per cycle.
module dagc_power_calc
#(
  parameter int unsigned RSSI_W = dagc_pkg::RSSI_W,
  parameter int unsigned BETA_W = dagc_pkg::BETA_W,
  parameter int unsigned A0_W   = dagc_pkg::A0_W,
  parameter int unsigned PC_W   = dagc_pkg::PC_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic        [RSSI_W-1:0] pn,
  input  logic signed [BETA_W-1:0] beta,
  input  logic signed [A0_W-1:0]   a0,
  output logic                     out_valid,
  output logic signed [PC_W-1:0]   pc
);

  localparam int unsigned PROD_W = BETA_W + RSSI_W + 1;

  logic signed [PROD_W-1:0] prod;
  logic signed [PC_W-1:0]   pc_d;

  initial begin
    assert (PC_W > PROD_W && PC_W > A0_W)
      else $error("dagc_power_calc: PC_W too small for Beta*Pn + A0");
  end

  always_comb begin
    prod = PROD_W'(beta) * $signed({1'b0, pn});
    pc_d = PC_W'(prod) + PC_W'(a0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      pc        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pc <= pc_d;
    end
  end

endmodule
