// dagc_end_stage: decides when computed gains reach the front end.
//
// Holds the gain word driven to the radio and updates it from the correction
// stage only when allowed:
//   * freeze (a pulse from the receiver once a frame is detected and
//     synchronised) holds the gains that are applied in that cycle, until a
//     release pulse (end of frame or aborted reception).
//   * After every LNA change the gains are also held for n clock cycles,
//     because the RSSI detector sits after the LNA and needs that long to
//     settle; computed values arriving meanwhile are dropped.
// VGA-only changes do not start the hold: VGA changes are invisible to the
// RSSI detector. After reset the LNA is at its highest level and the VGA at
// VGA max, so that even a very weak signal is sensed.
// Freeze, release, the n-cycle hold and the reset state are the design's;
// treating freeze and release as pulses, giving freeze priority when both
// arrive together, and letting the hold count down while frozen are this
// implementation's choices.
//
// Interface: in_valid/vga_calc/lna_calc from the correction stage;
// vga_gain/lna are the applied gains, frozen and settling report the holds.
// Timing: an allowed update appears on vga_gain/lna one cycle after in_valid.
module dagc_end_stage
  import dagc_pkg::lna_e, dagc_pkg::LNA_HIGH;
#(
  parameter int unsigned VGA_W = dagc_pkg::VGA_W,
  parameter int unsigned N_W   = dagc_pkg::N_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [VGA_W-1:0] vga_calc,
  input  lna_e             lna_calc,
  input  logic             freeze,
  input  logic             release_i,
  input  logic [N_W-1:0]   n_settle,
  input  logic [VGA_W-1:0] vga_max,
  output logic [VGA_W-1:0] vga_gain,
  output lna_e             lna,
  output logic             frozen,
  output logic             settling
);

  logic [N_W-1:0] cnt_q;
  logic           apply;

  assign settling = (cnt_q != '0);
  assign apply    = in_valid && !frozen && !freeze && !settling;

  always_ff @(posedge clk) begin
    if (rst) begin
      vga_gain <= vga_max;
      lna      <= LNA_HIGH;
      frozen   <= 1'b0;
      cnt_q    <= '0;
    end else begin
      if (freeze)         frozen <= 1'b1;
      else if (release_i) frozen <= 1'b0;

      if (apply) begin
        vga_gain <= vga_calc;
        lna      <= lna_calc;
        cnt_q    <= (lna_calc != lna) ? n_settle : '0;
      end else if (settling) begin
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

  // The gains never move while frozen, and the LNA never moves during the
  // settling hold.
  property p_hold_frozen;
    @(posedge clk) disable iff (rst) (frozen || freeze) |=> ($stable(vga_gain) && $stable(lna));
  endproperty
  a_hold_frozen: assert property (p_hold_frozen);

  property p_hold_settling;
    @(posedge clk) disable iff (rst) settling |=> $stable(lna);
  endproperty
  a_hold_settling: assert property (p_hold_settling);

endmodule
