// End-to-end testbench for dagc_top, at its default configuration.
//
// Closes the gain loop: a behavioural front end (LNA, RSSI detector, VGA)
// feeds a behavioural 10-bit RSSI A/D converter, whose codes drive the AGC,
// whose gain outputs drive the front end back. The testbench then
//   * checks the reset state (LNA high, VGA at VGA max) and register defaults,
//   * measures the pipeline latency (RSSI sample to gain output, 4 clocks)
//     with the loop opened and alpha = 1, n = 0,
//   * steps the antenna power across -90 .. -20 dBm in the 5 GHz band model
//     and checks after each step that the LNA level is the highest usable
//     one and the VGA gain is within one step of ideal, and that the loop
//     settles in under 1 us at 80 MHz on average,
//   * drives signals too weak for the VGA (saturation at VGA max),
//   * switches to the 2.4 GHz band model, reprogramming Beta and A0 through
//     the register port, and repeats the power steps,
//   * freezes the gains during a "frame", changes the power, checks that
//     nothing moves, releases and checks that the loop converges again,
//   * runs with RSSI samples on every other clock and a slower average.
// It counts each mechanism (LNA change with settling hold, VGA saturation,
// each LNA level, freeze, release, band switch, sample gaps) and fails if
// one never happened.
module dagc_top_tb;
  import dagc_pkg::*;

  localparam int VGA_MAX_DEF = 26;

  logic              clk = 1'b0;
  logic              rst;
  logic              reg_we;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_wdata;
  logic [REG_DW-1:0] reg_rdata;
  logic              rssi_valid;
  logic [RSSI_W-1:0] rssi;
  logic              freeze, release_i;
  logic [VGA_W-1:0]  vga_gain;
  logic [1:0]        lna_gain;
  lna_e              lna_level;
  logic              frozen, settling;

  // front end and converter
  real        p_in_dbm;
  logic       band;
  real        slope_v_per_db, offset_v;
  real        rssi_v, out_dbm;
  logic       adc_valid;
  logic [9:0] adc_code;
  // test control of the RSSI input
  logic       open_loop;
  logic [9:0] direct_rssi;
  logic       decimate;
  logic       phase;

  int checks = 0, failures = 0;
  int cyc = 0;
  int vga_max_now = VGA_MAX_DEF;
  // mechanism counters
  int n_lna_changes = 0, n_settle_cycles = 0, n_saturated = 0, n_freeze = 0;
  int n_release = 0, n_band_switch = 0, n_gap_samples = 0;
  int n_level[3] = '{0, 0, 0};
  // settling statistics
  int settle_sum = 0, settle_steps = 0, settle_max = 0;

  dagc_top dut (.*);

  rf_frontend_model u_fe (
    .clk, .p_in_dbm, .slope_v_per_db, .offset_v, .lna_gain, .vga_gain, .rssi_v, .out_dbm
  );

  rssi_adc_model u_adc (.clk, .vin(rssi_v), .valid(adc_valid), .code(adc_code));

  // Two bands with different RSSI lines:
  //   band 0 (5 GHz):   V = 0.024 V/dB * (P + 100 dBm)
  //   band 1 (2.4 GHz): V = 0.020 V/dB * (P + 100 dBm) + 0.080 V
  assign slope_v_per_db = band ? 0.020 : 0.024;
  assign offset_v       = band ? 0.080 : 0.0;

  assign rssi       = open_loop ? direct_rssi : adc_code;
  assign rssi_valid = open_loop ? 1'b1 : (adc_valid && (!decimate || phase));

  always #6 clk = ~clk;    // ~80 MHz

  always_ff @(posedge clk) begin
    cyc   <= cyc + 1;
    phase <= ~phase;
    if (!rst) begin
      if (settling) n_settle_cycles++;
      if (decimate && !rssi_valid) n_gap_samples++;
    end
  end

  lna_e lna_prev = LNA_HIGH;
  always_ff @(posedge clk) begin
    lna_prev <= lna_level;
    if (!rst && lna_level != lna_prev) n_lna_changes++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: P=%0.1f band=%0d lna=%0d vga=%0d out=%0.1f dBm", what, p_in_dbm, band,
               lna_level, vga_gain, out_dbm);
    end
  endtask

  task automatic reg_write(reg_addr_e a, int d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = a; reg_wdata = REG_DW'(d);
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  task automatic reg_read(reg_addr_e a, output int d);
    @(negedge clk);
    reg_addr = a;
    #1;
    d = int'(reg_rdata);
  endtask

  // Linear fit of the front-end model: VGA steps needed at LNA high as a
  // function of the RSSI code, as fixed point with 10 fraction bits.
  task automatic calibrate(logic b);
    real codes_per_db, code_offset, beta_r, a0_r;
    codes_per_db = b ? 10.0 : 12.0;
    code_offset  = b ? 40.0 : 0.0;
    // P = (code - off)/cpd - 100 ; vga = (-40 - P)/2
    beta_r = -1.0 / (2.0 * codes_per_db);
    a0_r   = 30.0 + code_offset / (2.0 * codes_per_db);
    reg_write(REG_BETA, $rtoi($floor(beta_r * 1024.0 + 0.5)));
    reg_write(REG_A0, $rtoi($floor(a0_r * 1024.0 + 0.5)));
  endtask

  function automatic lna_e ideal_lna(real p);
    if (p <= -40.0) return LNA_HIGH;
    if (p <= -24.0) return LNA_MED;
    return LNA_LOW;
  endfunction

  function automatic real ideal_vga(real p, lna_e l);
    real g = (-40.0 - (p - 16.0 * real'(int'(l)))) / 2.0;
    if (g < 0.0) g = 0.0;
    if (g > real'(vga_max_now)) g = real'(vga_max_now);
    return g;
  endfunction

  // Apply an antenna power, run for a window, check the final gains. The
  // settling time of a step is the last clock at which the gains were still
  // outside the final tolerance (wrong LNA level or VGA off by more than one
  // step); noise may still dither the VGA by one step afterwards.
  task automatic power_step(real p, int window);
    int last_bad = 0;
    p_in_dbm = p;
    for (int i = 1; i <= window; i++) begin
      real e;
      @(posedge clk); #1;
      e = real'(vga_gain) - ideal_vga(p, lna_level);
      if (lna_level != ideal_lna(p) || e > 1.0 || e < -1.0) last_bad = i;
    end
    if (last_bad > window / 2) $display("slow step to %0.1f dBm: settled at %0d", p, last_bad);
    settle_sum += last_bad;
    settle_steps++;
    if (last_bad > settle_max) settle_max = last_bad;
    check($sformatf("LNA level for %0.1f dBm", p), lna_level == ideal_lna(p));
    begin
      real e = real'(vga_gain) - ideal_vga(p, lna_level);
      check($sformatf("VGA gain for %0.1f dBm", p), e <= 1.0 && e >= -1.0);
    end
    n_level[int'(lna_level)]++;
    if (vga_gain == VGA_W'(vga_max_now) && ideal_vga(p, LNA_HIGH) >= real'(vga_max_now))
      n_saturated++;
  endtask

  // A power not within 2 dB of an LNA switching point.
  function automatic real random_power(real lo, real hi);
    real p;
    do p = lo + (hi - lo) * real'($urandom_range(0, 10000)) / 10000.0;
    while ((p > -42.0 && p < -38.0) || (p > -26.0 && p < -22.0));
    return p;
  endfunction

  initial begin
    int d;
    rst = 1'b1; reg_we = 1'b0; reg_addr = '0; reg_wdata = '0;
    freeze = 1'b0; release_i = 1'b0;
    p_in_dbm = -70.0; band = 1'b0;
    open_loop = 1'b1; direct_rssi = 10'd120; decimate = 1'b0; phase = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    check("reset LNA high", lna_gain == 2'b11 && lna_level == LNA_HIGH);
    check("reset VGA max", vga_gain == VGA_W'(VGA_MAX_DEF));
    rst = 1'b0;
    reg_read(REG_M, d);        check("default m", d == 2);
    reg_read(REG_VGA_MAX, d);  check("default VGA max", d == VGA_MAX_DEF);
    reg_read(REG_N_SETTLE, d); check("default n", d == 32);

    // ---- pipeline latency, loop open, alpha = 1, no settling hold ----
    reg_write(REG_M, 0);
    reg_write(REG_N_SETTLE, 0);
    direct_rssi = 10'd120;                    // 30 - 5 = 25 VGA steps
    repeat (20) @(posedge clk);
    #1;
    check("open loop weak", vga_gain == 5'd25 && lna_level == LNA_HIGH);
    @(negedge clk);
    direct_rssi = 10'd480;                    // 30 - 20 = 10 VGA steps
    begin
      int lat = 1;
      @(posedge clk); #1;                     // edge 1: sample taken
      while (vga_gain == 5'd25 && lat < 20) begin
        @(posedge clk); #1;
        lat++;
      end
      check($sformatf("latency %0d == 4 clocks", lat), lat == 4);
      check("open loop value", vga_gain == 5'd10);
    end

    // ---- closed loop, 5 GHz band, default calibration ----
    reg_write(REG_M, 2);
    reg_write(REG_N_SETTLE, 32);
    open_loop = 1'b0;
    power_step(-70.0, 400);
    foreach (d_list[i]) power_step(d_list[i], 400);
    for (int i = 0; i < 30; i++) power_step(random_power(-90.0, -20.0), 400);

    // ---- too weak for the VGA: saturation at VGA max ----
    power_step(-96.0, 400);
    reg_write(REG_VGA_MAX, 20);
    vga_max_now = 20;
    power_step(-85.0, 400);
    reg_write(REG_VGA_MAX, VGA_MAX_DEF);
    vga_max_now = VGA_MAX_DEF;

    // ---- 2.4 GHz band: new calibration through the register port ----
    band = 1'b1;
    calibrate(1'b1);
    n_band_switch++;
    for (int i = 0; i < 20; i++) power_step(random_power(-90.0, -20.0), 400);
    band = 1'b0;
    calibrate(1'b0);
    n_band_switch++;
    power_step(-60.0, 400);

    // ---- freeze during a frame ----
    begin
      logic [VGA_W-1:0] v_hold;
      logic [1:0] l_hold;
      power_step(-55.0, 400);
      @(negedge clk);
      freeze = 1'b1;
      v_hold = vga_gain; l_hold = lna_gain;
      @(negedge clk);
      freeze = 1'b0;
      n_freeze++;
      p_in_dbm = -25.0;
      for (int i = 0; i < 300; i++) begin
        @(posedge clk); #1;
        check("held while frozen", vga_gain == v_hold && lna_gain == l_hold && frozen);
      end
      @(negedge clk);
      release_i = 1'b1;
      @(negedge clk);
      release_i = 1'b0;
      n_release++;
      power_step(-25.0, 400);
    end

    // ---- samples on every other clock, slower averaging ----
    decimate = 1'b1;
    reg_write(REG_M, 4);
    reg_write(REG_N_SETTLE, 64);
    for (int i = 0; i < 10; i++) power_step(random_power(-90.0, -20.0), 1200);
    decimate = 1'b0;

    // ---- results ----
    $display("settling: %0d steps, mean %0d clocks, max %0d clocks", settle_steps,
             settle_sum / settle_steps, settle_max);
    $display("mechanisms: lna_changes=%0d settle_cycles=%0d saturated=%0d freeze=%0d release=%0d band=%0d gaps=%0d levels=%0d/%0d/%0d",
             n_lna_changes, n_settle_cycles, n_saturated, n_freeze, n_release, n_band_switch,
             n_gap_samples, n_level[0], n_level[1], n_level[2]);
    check("mean settling within 1 us (80 clocks)", settle_sum / settle_steps <= 80);
    check("LNA changes happened", n_lna_changes > 0);
    check("settling holds happened", n_settle_cycles > 0);
    check("VGA saturation happened", n_saturated > 0);
    check("freeze happened", n_freeze > 0);
    check("release happened", n_release > 0);
    check("band switch happened", n_band_switch > 0);
    check("sample gaps happened", n_gap_samples > 0);
    check("all LNA levels used", n_level[0] > 0 && n_level[1] > 0 && n_level[2] > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fixed sweep: each LNA level, both directions.
  real d_list[] = '{-90.0, -45.0, -30.0, -20.0, -35.0, -50.0, -80.0, -21.0, -88.0};

endmodule
