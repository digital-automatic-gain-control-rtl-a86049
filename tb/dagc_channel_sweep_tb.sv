// Channel and band sweep of dagc_top at its default configuration.
//
// Reproduces the kind of evaluation the AGC was designed against: six
// channels, three in each band, with input power from -90 dBm to -20 dBm.
// Each channel has its own RSSI line (slightly different slope and offset);
// each band is calibrated once, through the register port, with the line of
// its middle channel. This tests that one linear fit per band serves every
// channel of that band.
// For every 1 dB step up and every 5 dB step down, the loop runs to steady
// state and the testbench checks
//   * the output power after the VGA is within 4 dB of the -40 dBm target,
//     unless the VGA is at VGA max (signal below the sensitivity limit),
//   * the LNA level is the ideal one when the power is more than 4 dB away
//     from an LNA switching point,
//   * the mean settling time is at most 80 clocks (1 us at 80 MHz).
// The channel RSSI lines are this testbench's own, not measured values.
module dagc_channel_sweep_tb;
  import dagc_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  logic              reg_we;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_wdata;
  logic [REG_DW-1:0] reg_rdata;
  logic              rssi_valid;
  logic [RSSI_W-1:0] rssi;
  logic              freeze = 1'b0, release_i = 1'b0;
  logic [VGA_W-1:0]  vga_gain;
  logic [1:0]        lna_gain;
  lna_e              lna_level;
  logic              frozen, settling;

  real p_in_dbm = -70.0;
  real slope_v_per_db = 0.024, offset_v = 0.0;
  real rssi_v, out_dbm;

  // channel RSSI lines: 3 in the 5 GHz band, 3 in the 2.4 GHz band
  real ch_slope[6]  = '{0.0235, 0.0240, 0.0245, 0.0195, 0.0200, 0.0205};
  real ch_offset[6] = '{0.010, 0.000, -0.010, 0.090, 0.080, 0.070};

  int checks = 0, failures = 0;
  int settle_sum = 0, settle_steps = 0, settle_max = 0;
  real worst_err = 0.0;
  int n_level[3] = '{0, 0, 0};
  int n_saturated = 0;

  dagc_top dut (.*);
  rf_frontend_model u_fe (.clk, .p_in_dbm, .slope_v_per_db, .offset_v, .lna_gain, .vga_gain,
                          .rssi_v, .out_dbm);
  rssi_adc_model u_adc (.clk, .vin(rssi_v), .valid(rssi_valid), .code(rssi));

  always #6 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: P=%0.1f lna=%0d vga=%0d out=%0.2f dBm", what, p_in_dbm, lna_level,
               vga_gain, out_dbm);
    end
  endtask

  task automatic reg_write(reg_addr_e a, int d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = a; reg_wdata = REG_DW'(d);
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  // Fit of a channel's RSSI line: VGA steps = 30 - (code - off)/(2 cpd),
  // with cpd = slope / 2 mV codes per dB and off = offset / 2 mV.
  task automatic calibrate(int ch);
    real cpd = ch_slope[ch] / 0.002;
    real off = ch_offset[ch] / 0.002;
    reg_write(REG_BETA, $rtoi($floor(-1024.0 / (2.0 * cpd) + 0.5)));
    reg_write(REG_A0, $rtoi($floor((30.0 + off / (2.0 * cpd)) * 1024.0 + 0.5)));
  endtask

  function automatic lna_e ideal_lna(real p);
    if (p <= -40.0) return LNA_HIGH;
    if (p <= -24.0) return LNA_MED;
    return LNA_LOW;
  endfunction

  task automatic power_step(real p);
    int last_bad = 0;
    real err;
    p_in_dbm = p;
    for (int i = 1; i <= 300; i++) begin
      @(posedge clk); #1;
      err = out_dbm + 40.0;
      if (!(err <= 4.0 && err >= -4.0) && vga_gain != VGA_W'(DEF_VGA_MAX)) last_bad = i;
    end
    settle_sum += last_bad;
    settle_steps++;
    if (last_bad > settle_max) settle_max = last_bad;
    err = out_dbm + 40.0;
    if (vga_gain == VGA_W'(DEF_VGA_MAX) && err < 0.0) begin
      n_saturated++;
      check("below sensitivity only for weak signals", p < -88.0);
    end else begin
      check("output level within 4 dB", err <= 4.0 && err >= -4.0);
      if (err > worst_err) worst_err = err;
      if (-err > worst_err) worst_err = -err;
    end
    if ((p < -44.0 || p > -36.0) && (p < -28.0 || p > -20.0))
      check("LNA level", lna_level == ideal_lna(p));
    n_level[int'(lna_level)]++;
  endtask

  initial begin
    rst = 1'b1; reg_we = 1'b0; reg_addr = '0; reg_wdata = '0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    for (int ch = 0; ch < 6; ch++) begin
      if (ch == 0) calibrate(1);      // 5 GHz band fit
      if (ch == 3) calibrate(4);      // 2.4 GHz band fit
      slope_v_per_db = ch_slope[ch];
      offset_v       = ch_offset[ch];
      for (int p = -90; p <= -20; p++) power_step(real'(p));
      for (int p = -20; p >= -90; p -= 5) power_step(real'(p));
      $display("channel %0d done: worst level error so far %0.2f dB", ch, worst_err);
    end
    $display("settling: %0d steps, mean %0d clocks, max %0d clocks", settle_steps,
             settle_sum / settle_steps, settle_max);
    $display("levels high/med/low %0d/%0d/%0d, saturated %0d", n_level[0], n_level[1],
             n_level[2], n_saturated);
    check("mean settling within 80 clocks", settle_sum / settle_steps <= 80);
    check("all LNA levels used", n_level[0] > 0 && n_level[1] > 0 && n_level[2] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
