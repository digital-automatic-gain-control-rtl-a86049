// Testbench for dagc_gain_correction.
//
// Drives random power estimates (with fraction bits), random current LNA
// levels, Level_set values and VGA max, and compares the chosen LNA level and
// VGA gain with a model that works in real numbers: round Pc to whole VGA
// steps, refer it to the highest LNA level, then walk the LNA levels from
// high to low and take the first whose VGA gain is not negative, clamped to
// 0 .. VGA max. Directed cases cover each LNA decision and both clamps, and
// the one-cycle latency is checked.
module dagc_gain_correction_tb;
  import dagc_pkg::lna_e, dagc_pkg::LNA_HIGH, dagc_pkg::LNA_MED, dagc_pkg::LNA_LOW;
  localparam int PC_W = 28, FRAC = 10, VGA_W = 5, LVL_W = 6;

  logic                   clk = 1'b0;
  logic                   rst;
  logic                   in_valid;
  logic signed [PC_W-1:0] pc;
  lna_e                   lna_cur;
  logic      [LVL_W-1:0]  level_med, level_low;
  logic      [VGA_W-1:0]  vga_max;
  logic                   out_valid;
  logic      [VGA_W-1:0]  vga_calc;
  lna_e                   lna_calc;

  int checks = 0, failures = 0;
  int exp_vga;
  lna_e exp_lna;
  int hit_lna[3];
  int hit_sat_hi = 0, hit_sat_lo = 0;

  dagc_gain_correction dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(int pcv, lna_e cur, int lm, int ll, int vmax);
    int offs[3];
    int q, g, v;
    offs[0] = 0; offs[1] = lm; offs[2] = ll;
    q = $rtoi($floor(real'(pcv) / 1024.0 + 0.5));
    g = q - offs[int'(cur)];
    exp_lna = LNA_LOW;
    v = g + offs[2];
    for (int l = 0; l < 3; l++) begin
      if (g + offs[l] >= 0) begin
        exp_lna = lna_e'(l);
        v = g + offs[l];
        break;
      end
    end
    if (v > vmax) hit_sat_hi++;
    if (v < 0) hit_sat_lo++;
    exp_vga = (v < 0) ? 0 : (v > vmax) ? vmax : v;
    hit_lna[int'(exp_lna)]++;
  endtask

  task automatic apply(int pcv, lna_e cur, int lm, int ll, int vmax);
    in_valid  <= 1'b1;
    pc        <= PC_W'(pcv);
    lna_cur   <= cur;
    level_med <= LVL_W'(lm);
    level_low <= LVL_W'(ll);
    vga_max   <= VGA_W'(vmax);
    model(pcv, cur, lm, ll, vmax);
    @(posedge clk); #1;
    checks++;
    if (!(out_valid && vga_calc == VGA_W'(exp_vga) && lna_calc == exp_lna)) begin
      failures++;
      $display("FAIL pc=%0d cur=%0d lm=%0d ll=%0d vmax=%0d -> vga=%0d lna=%0d exp %0d %0d",
               pcv, cur, lm, ll, vmax, vga_calc, lna_calc, exp_vga, exp_lna);
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; pc = '0; lna_cur = LNA_HIGH;
    level_med = '0; level_low = '0; vga_max = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // Directed: default calibration, 8 / 16 step LNA corrections, VGA max 26.
    apply(10 * 1024, LNA_HIGH, 8, 16, 26);        // weak: LNA high, VGA 10
    apply(40 * 1024, LNA_HIGH, 8, 16, 26);        // very weak: VGA saturates
    apply(-5 * 1024, LNA_HIGH, 8, 16, 26);        // strong: LNA medium, VGA 3
    apply(-10 * 1024, LNA_HIGH, 8, 16, 26);       // very strong: LNA low, VGA 6
    apply(-30 * 1024, LNA_HIGH, 8, 16, 26);       // beyond range: VGA 0
    apply(3 * 1024, LNA_MED, 8, 16, 26);          // on medium, stays medium
    apply(12 * 1024, LNA_MED, 8, 16, 26);         // on medium, back to high
    apply(6 * 1024, LNA_LOW, 8, 16, 26);          // on low, stays low
    apply(1024 / 2, LNA_HIGH, 8, 16, 26);         // 0.5 rounds up to 1
    apply(1024 / 2 - 1, LNA_HIGH, 8, 16, 26);     // just under rounds to 0
    apply(-1024 / 2, LNA_HIGH, 8, 16, 26);        // -0.5 rounds to 0
    apply(-1024 / 2 - 1, LNA_HIGH, 8, 16, 26);    // -0.5- rounds to -1

    // Random.
    for (int i = 0; i < 20000; i++)
      apply($urandom_range(0, 80 * 1024) - 40 * 1024, lna_e'($urandom_range(0, 2)),
            $urandom_range(0, 20), $urandom_range(10, 40), $urandom_range(0, 31));

    // Extreme estimates must not wrap.
    apply(2 ** 26, LNA_LOW, 63, 63, 31);
    apply(-(2 ** 26), LNA_HIGH, 63, 63, 31);

    in_valid <= 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid without input");
    end

    for (int l = 0; l < 3; l++) begin
      checks++;
      if (hit_lna[l] == 0) begin
        failures++;
        $display("FAIL LNA level %0d never chosen", l);
      end
    end
    checks++;
    if (hit_sat_hi == 0 || hit_sat_lo == 0) begin
      failures++;
      $display("FAIL a VGA clamp never exercised");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
