// dagc_top: digital automatic gain control for an OFDM WLAN receiver.
//
// Sets the LNA (3 levels) and VGA (5 bits) gains of the radio front end from
// the digitised RSSI alone, with no I/Q power estimation and no look-up
// tables. A four-stage pipeline:
//   power detector  -> running average Pn of the RSSI, alpha = 2^-m
//   power calc      -> Pc = Beta * Pn + A0 (one multiplier)
//   gain correction -> LNA correction by Level_set, LNA choice, quantisation,
//                      saturation at VGA max
//   end stage       -> applies the gains unless frozen by the receiver
//                      (freeze .. release) or held for n cycles after an LNA
//                      change while the RSSI settles
// with a register bank holding m, Beta, A0, VGA max, Level_set and n.
// The chain and its equations are the design's; widths, register map and the
// exact LNA decision rule are this implementation's (see the blocks).
//
// Interface: rssi/rssi_valid from the RSSI A/D converter; freeze/release_i
// from the baseband receiver; reg_* is the control register port;
// vga_gain/lna_gain drive the front end (lna_gain in MAX2829 B7:B6 coding).
// Timing: an RSSI sample reaches the gain outputs four clocks later.
module dagc_top
  import dagc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // control register port
  input  logic              reg_we,
  input  logic [REG_AW-1:0] reg_addr,
  input  logic [REG_DW-1:0] reg_wdata,
  output logic [REG_DW-1:0] reg_rdata,
  // RSSI from the A/D converter
  input  logic              rssi_valid,
  input  logic [RSSI_W-1:0] rssi,
  // frame control from the baseband receiver
  input  logic              freeze,
  input  logic              release_i,
  // gains to the front end
  output logic [VGA_W-1:0]  vga_gain,
  output logic [1:0]        lna_gain,
  output lna_e              lna_level,
  output logic              frozen,
  output logic              settling
);

  dagc_cfg_t               cfg;
  logic                    pn_valid, pc_valid, corr_valid;
  logic [RSSI_W-1:0]       pn;
  logic signed [PC_W-1:0]  pc;
  logic [VGA_W-1:0]        vga_calc;
  lna_e                    lna_calc;

  dagc_regs u_regs (
    .clk, .rst,
    .we    (reg_we),
    .addr  (reg_addr),
    .wdata (reg_wdata),
    .rdata (reg_rdata),
    .cfg   (cfg)
  );

  dagc_power_detector u_detector (
    .clk, .rst,
    .in_valid  (rssi_valid),
    .rssi      (rssi),
    .m         (cfg.m),
    .out_valid (pn_valid),
    .pn        (pn)
  );

  dagc_power_calc u_calc (
    .clk, .rst,
    .in_valid  (pn_valid),
    .pn        (pn),
    .beta      (cfg.beta),
    .a0        (cfg.a0),
    .out_valid (pc_valid),
    .pc        (pc)
  );

  dagc_gain_correction u_correction (
    .clk, .rst,
    .in_valid  (pc_valid),
    .pc        (pc),
    .lna_cur   (lna_level),
    .level_med (cfg.level_med),
    .level_low (cfg.level_low),
    .vga_max   (cfg.vga_max),
    .out_valid (corr_valid),
    .vga_calc  (vga_calc),
    .lna_calc  (lna_calc)
  );

  dagc_end_stage u_end (
    .clk, .rst,
    .in_valid  (corr_valid),
    .vga_calc  (vga_calc),
    .lna_calc  (lna_calc),
    .freeze    (freeze),
    .release_i (release_i),
    .n_settle  (cfg.n_settle),
    .vga_max   (cfg.vga_max),
    .vga_gain  (vga_gain),
    .lna       (lna_level),
    .frozen    (frozen),
    .settling  (settling)
  );

  assign lna_gain = lna_code(lna_level);

endmodule
