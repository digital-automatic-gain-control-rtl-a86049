// Testbench for dagc_end_stage.
//
// Feeds a random stream of computed gains together with random freeze and
// release pulses and random settling holds n, and compares the applied
// gains every cycle with a cycle model: a computed value is taken when it is
// valid, the stage is neither frozen nor being frozen, and the hold counter
// is zero; taking an LNA change loads the counter with n. Also checks the
// reset state (LNA high, VGA at VGA max), that a freeze keeps the gains of
// the cycle it arrives in until release, and that after an LNA change the
// next update lands exactly n + 1 cycles later.
module dagc_end_stage_tb;
  import dagc_pkg::lna_e, dagc_pkg::LNA_HIGH, dagc_pkg::LNA_MED, dagc_pkg::LNA_LOW;
  localparam int VGA_W = 5, N_W = 8;

  logic             clk = 1'b0;
  logic             rst;
  logic             in_valid;
  logic [VGA_W-1:0] vga_calc;
  lna_e             lna_calc;
  logic             freeze, release_i;
  logic [N_W-1:0]   n_settle;
  logic [VGA_W-1:0] vga_max;
  logic [VGA_W-1:0] vga_gain;
  lna_e             lna;
  logic             frozen, settling;

  int checks = 0, failures = 0;
  // model state
  int   m_vga, m_cnt;
  lna_e m_lna;
  bit   m_frozen;
  int   n_freeze = 0, n_settle_holds = 0, n_dropped = 0;

  dagc_end_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (vga_gain != VGA_W'(m_vga) || lna != m_lna || frozen != m_frozen ||
        settling != (m_cnt != 0)) begin
      failures++;
      $display("FAIL %s t=%0t vga=%0d/%0d lna=%0d/%0d frozen=%0d/%0d settling=%0d cnt=%0d",
               what, $time, vga_gain, m_vga, lna, m_lna, frozen, m_frozen, settling, m_cnt);
    end
  endtask

  task automatic cycle(bit v, int vg, lna_e ln, bit fz, bit rl, int n);
    bit take;
    in_valid  <= v;
    vga_calc  <= VGA_W'(vg);
    lna_calc  <= ln;
    freeze    <= fz;
    release_i <= rl;
    n_settle  <= N_W'(n);
    take = v && !m_frozen && !fz && (m_cnt == 0);
    if (v && !take) n_dropped++;
    if (m_cnt != 0 && v) n_settle_holds++;
    @(posedge clk);
    if (take) begin
      m_cnt = (ln != m_lna) ? n : 0;
      m_vga = vg;
      m_lna = ln;
    end else if (m_cnt != 0) m_cnt--;
    if (fz) begin m_frozen = 1; n_freeze++; end
    else if (rl) m_frozen = 0;
    #1;
    compare("cycle");
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; vga_calc = '0; lna_calc = LNA_HIGH;
    freeze = 1'b0; release_i = 1'b0; n_settle = '0; vga_max = 5'd26;
    repeat (3) @(posedge clk);
    #1;
    m_vga = 26; m_lna = LNA_HIGH; m_frozen = 0; m_cnt = 0;
    compare("reset state");
    rst <= 1'b0;
    @(posedge clk); #1;
    compare("after reset");

    // Directed: LNA change at n = 5, next update exactly 6 cycles later.
    begin
      int t0, t1;
      cycle(1, 12, LNA_MED, 0, 0, 5);
      t0 = 0; t1 = -1;
      for (int i = 1; i <= 10; i++) begin
        cycle(1, 7 + i, LNA_MED, 0, 0, 5);
        if (t1 < 0 && vga_gain != 5'd12) t1 = i;
      end
      checks++;
      if (t1 != 6) begin
        failures++;
        $display("FAIL settling hold: update after %0d cycles, expected 6", t1);
      end
    end

    // Directed: freeze keeps the gains of that cycle until release.
    cycle(1, 3, LNA_MED, 0, 0, 5);
    cycle(1, 9, LNA_MED, 1, 0, 5);
    for (int i = 0; i < 20; i++) cycle(1, i, LNA_LOW, 0, 0, 5);
    checks++;
    if (vga_gain != 5'd3 || lna != LNA_MED) begin
      failures++;
      $display("FAIL freeze did not hold");
    end
    cycle(1, 17, LNA_MED, 0, 1, 5);
    cycle(1, 18, LNA_MED, 0, 0, 5);
    checks++;
    if (vga_gain != 5'd18) begin
      failures++;
      $display("FAIL release did not resume updates");
    end

    // Random.
    for (int i = 0; i < 50000; i++)
      cycle($urandom_range(0, 3) != 0, $urandom_range(0, 31), lna_e'($urandom_range(0, 2)),
            $urandom_range(0, 199) == 0, $urandom_range(0, 39) == 0, $urandom_range(0, 12));

    checks++;
    if (n_freeze == 0 || n_settle_holds == 0 || n_dropped == 0) begin
      failures++;
      $display("FAIL coverage freeze=%0d settle=%0d dropped=%0d", n_freeze, n_settle_holds, n_dropped);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
