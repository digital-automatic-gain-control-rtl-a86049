// dagc_regs: programmable control registers of the AGC.
//
// Holds every tuning value the AGC uses so that one controller serves both
// the 2.4 GHz and 5 GHz bands: the averaging exponent m, the linearisation
// slope Beta and offset A0, the VGA saturation level VGA max, the LNA
// correction Level_set for the medium and low LNA levels, and the RSSI
// settling hold n. That these values are programmable is the design's; the
// register map, the simple write/read port and the reset defaults (see
// dagc_pkg) are this implementation's.
//
// Interface: a write takes effect at the clock edge where we is high;
// wdata is truncated to the field's width (signed fields take their low
// bits). rdata returns the addressed field combinationally, sign-extended
// for Beta and A0, zero for unused addresses. cfg is the registered set.
module dagc_regs
  import dagc_pkg::*;
#(
  parameter logic        [M_W-1:0]    RST_M         = DEF_M,
  parameter logic signed [BETA_W-1:0] RST_BETA      = DEF_BETA,
  parameter logic signed [A0_W-1:0]   RST_A0        = DEF_A0,
  parameter logic        [VGA_W-1:0]  RST_VGA_MAX   = DEF_VGA_MAX,
  parameter logic        [LVL_W-1:0]  RST_LEVEL_MED = DEF_LEVEL_MED,
  parameter logic        [LVL_W-1:0]  RST_LEVEL_LOW = DEF_LEVEL_LOW,
  parameter logic        [N_W-1:0]    RST_N_SETTLE  = DEF_N_SETTLE
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [REG_AW-1:0] addr,
  input  logic [REG_DW-1:0] wdata,
  output logic [REG_DW-1:0] rdata,
  output dagc_cfg_t         cfg
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.m         <= RST_M;
      cfg.beta      <= RST_BETA;
      cfg.a0        <= RST_A0;
      cfg.vga_max   <= RST_VGA_MAX;
      cfg.level_med <= RST_LEVEL_MED;
      cfg.level_low <= RST_LEVEL_LOW;
      cfg.n_settle  <= RST_N_SETTLE;
    end else if (we) begin
      case (addr)
        REG_M:         cfg.m         <= wdata[M_W-1:0];
        REG_BETA:      cfg.beta      <= wdata[BETA_W-1:0];
        REG_A0:        cfg.a0        <= wdata[A0_W-1:0];
        REG_VGA_MAX:   cfg.vga_max   <= wdata[VGA_W-1:0];
        REG_LEVEL_MED: cfg.level_med <= wdata[LVL_W-1:0];
        REG_LEVEL_LOW: cfg.level_low <= wdata[LVL_W-1:0];
        REG_N_SETTLE:  cfg.n_settle  <= wdata[N_W-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    case (addr)
      REG_M:         rdata = REG_DW'(cfg.m);
      REG_BETA:      rdata = REG_DW'(cfg.beta);
      REG_A0:        rdata = REG_DW'(cfg.a0);
      REG_VGA_MAX:   rdata = REG_DW'(cfg.vga_max);
      REG_LEVEL_MED: rdata = REG_DW'(cfg.level_med);
      REG_LEVEL_LOW: rdata = REG_DW'(cfg.level_low);
      REG_N_SETTLE:  rdata = REG_DW'(cfg.n_settle);
      default:       rdata = '0;
    endcase
  end

endmodule
