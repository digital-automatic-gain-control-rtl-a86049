// dagc_gain_correction: VGA & LNA correction.
//
// Turns the power estimate Pc into the next LNA level and VGA gain.
//   1. Quantise: q = round(Pc), Pc having COEF_FRAC fraction bits.
//   2. Undo the current LNA level: the RSSI detector sits after the LNA, so
//      the same linear fit gives a value that is Level_set(current) VGA steps
//      off for a reduced LNA. g_high = q - Level_set(current) is the VGA gain
//      the signal would need with the LNA at its highest level
//      (Level_set(high) = 0).
//   3. Keep the highest LNA level whose VGA gain is not negative:
//        g_high >= 0                  -> LNA high,   vga = g_high
//        g_high + Level_set(med) >= 0 -> LNA medium, vga = g_high + Level_set(med)
//        otherwise                    -> LNA low,    vga = g_high + Level_set(low)
//   4. Saturate the VGA gain to 0 .. VGA max, so that a weak signal never gets
//      more gain than the receiver can use.
// The correction by Level_set, the quantisation and the VGA max saturation
// are the design's; the exact decision rule in step 3 (prefer the highest LNA
// gain, no hysteresis) and round-half-up quantisation are this
// implementation's reading of the design's decision algorithm.
//
// Interface: in_valid/pc in, lna_cur is the level the front end has now.
// After reset the outputs hold LNA high and VGA max, like the end stage.
// Timing: one register stage, latency 1, one decision per cycle.
module dagc_gain_correction
  import dagc_pkg::lna_e, dagc_pkg::LNA_HIGH, dagc_pkg::LNA_MED, dagc_pkg::LNA_LOW;
#(
  parameter int unsigned PC_W  = dagc_pkg::PC_W,
  parameter int unsigned FRAC  = dagc_pkg::COEF_FRAC,
  parameter int unsigned VGA_W = dagc_pkg::VGA_W,
  parameter int unsigned LVL_W = dagc_pkg::LVL_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [PC_W-1:0] pc,
  input  lna_e                   lna_cur,
  input  logic      [LVL_W-1:0]  level_med,
  input  logic      [LVL_W-1:0]  level_low,
  input  logic      [VGA_W-1:0]  vga_max,
  output logic                   out_valid,
  output logic      [VGA_W-1:0]  vga_calc,
  output lna_e                   lna_calc
);

  localparam int unsigned Q_W = PC_W - FRAC + 2;

  logic signed [PC_W:0]  pc_round;
  logic signed [Q_W-1:0] q, g_high, v, lvl_cur, lvl_med_s, lvl_low_s, vmax_s;
  lna_e                  lna_d;
  logic      [VGA_W-1:0] vga_d;

  always_comb begin
    // Round half up to whole VGA steps.
    pc_round = (PC_W+1)'(pc) + (PC_W+1)'(1 << (FRAC - 1));
    q        = Q_W'(pc_round >>> FRAC);

    lvl_med_s = $signed(Q_W'(level_med));
    lvl_low_s = $signed(Q_W'(level_low));
    vmax_s    = $signed(Q_W'(vga_max));

    case (lna_cur)
      LNA_MED: lvl_cur = lvl_med_s;
      LNA_LOW: lvl_cur = lvl_low_s;
      default: lvl_cur = '0;
    endcase
    g_high = q - lvl_cur;

    if (g_high >= 0) begin
      lna_d = LNA_HIGH;
      v     = g_high;
    end else if (g_high + lvl_med_s >= 0) begin
      lna_d = LNA_MED;
      v     = g_high + lvl_med_s;
    end else begin
      lna_d = LNA_LOW;
      v     = g_high + lvl_low_s;
    end

    if (v < 0)                     vga_d = '0;
    else if (v > vmax_s)           vga_d = vga_max;
    else                           vga_d = VGA_W'(v);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      vga_calc  <= vga_max;
      lna_calc  <= LNA_HIGH;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        vga_calc <= vga_d;
        lna_calc <= lna_d;
      end
    end
  end

endmodule
