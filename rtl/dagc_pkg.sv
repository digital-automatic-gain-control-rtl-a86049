// dagc_pkg: widths, types and reset defaults shared by the digital AGC blocks.
//
// The AGC turns a digitised RSSI into the two gain controls of the radio front
// end: a 3-level LNA gain and a 5-bit VGA gain. Widths follow the design where
// it states them (10-bit RSSI, three LNA levels, one multiplier); the rest are
// this design's choices:
//   * m (averaging exponent) is 3 bits, so alpha = 2^-m runs from 1 to 1/128.
//   * Beta and A0 are signed fixed point with COEF_FRAC = 10 fraction bits;
//     Beta is 16 bits and A0 18 bits, so the single product fits one 18x18
//     multiplier.
//   * The power estimate Pc is expressed directly in VGA gain steps (the
//     linearisation maps RSSI to the needed VGA gain), with COEF_FRAC fraction
//     bits until it is quantised.
//   * Level_set (one value per reduced LNA level) and VGA max are in VGA steps.
//   * n, the LNA settling hold, is 8 bits of clock cycles.
// The LNA encoding on the front-end pins follows the MAX2829 receive gain
// word (bits B7:B6 = 11 high, 10 medium, 00 low).
// Reset defaults of the coefficients are a calibration for a front end whose
// RSSI reads 12 codes per dB and whose VGA has 2 dB steps; real values come
// from measurement and are written through the register port.
package dagc_pkg;

  localparam int unsigned RSSI_W    = 10;
  localparam int unsigned M_W       = 3;
  localparam int unsigned AVG_FRAC  = 7;
  localparam int unsigned BETA_W    = 16;
  localparam int unsigned A0_W      = 18;
  localparam int unsigned COEF_FRAC = 10;
  localparam int unsigned PC_W      = 28;
  localparam int unsigned VGA_W     = 5;
  localparam int unsigned LVL_W     = 6;
  localparam int unsigned N_W       = 8;
  localparam int unsigned REG_AW    = 3;
  localparam int unsigned REG_DW    = 18;

  // LNA gain levels, highest gain first.
  typedef enum logic [1:0] {
    LNA_HIGH = 2'd0,
    LNA_MED  = 2'd1,
    LNA_LOW  = 2'd2
  } lna_e;

  // Register map of the programmable control registers.
  typedef enum logic [REG_AW-1:0] {
    REG_M         = 3'd0,
    REG_BETA      = 3'd1,
    REG_A0        = 3'd2,
    REG_VGA_MAX   = 3'd3,
    REG_LEVEL_MED = 3'd4,
    REG_LEVEL_LOW = 3'd5,
    REG_N_SETTLE  = 3'd6
  } reg_addr_e;

  typedef struct packed {
    logic        [M_W-1:0]    m;
    logic signed [BETA_W-1:0] beta;
    logic signed [A0_W-1:0]   a0;
    logic        [VGA_W-1:0]  vga_max;
    logic        [LVL_W-1:0]  level_med;
    logic        [LVL_W-1:0]  level_low;
    logic        [N_W-1:0]    n_settle;
  } dagc_cfg_t;

  // Reset defaults: Pc = 30 - RSSI/24 VGA steps, LNA steps of 16 dB (8 VGA
  // steps) each, VGA saturating at step 26, 32-cycle RSSI settling hold.
  localparam logic        [M_W-1:0]    DEF_M         = 3'd2;
  localparam logic signed [BETA_W-1:0] DEF_BETA      = -16'sd43;
  localparam logic signed [A0_W-1:0]   DEF_A0        = 18'sd30720;
  localparam logic        [VGA_W-1:0]  DEF_VGA_MAX   = 5'd26;
  localparam logic        [LVL_W-1:0]  DEF_LEVEL_MED = 6'd8;
  localparam logic        [LVL_W-1:0]  DEF_LEVEL_LOW = 6'd16;
  localparam logic        [N_W-1:0]    DEF_N_SETTLE  = 8'd32;

  // MAX2829-style LNA gain bits for a level.
  function automatic logic [1:0] lna_code(lna_e lvl);
    case (lvl)
      LNA_HIGH: return 2'b11;
      LNA_MED:  return 2'b10;
      default:  return 2'b00;
    endcase
  endfunction

endpackage
