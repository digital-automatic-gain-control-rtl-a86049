// Testbench for dagc_power_detector.
//
// Drives random RSSI samples with random gaps in rssi valid and random
// averaging exponents m, and compares every output with an integer model of
// y(i+1) = y(i) + floor((x(i)*2^FRAC - y(i)) / 2^m), pn = round(y / 2^FRAC),
// written with division rather than shifts. Also checks the one-cycle
// latency of out_valid, and that a constant input is reached to within one
// RSSI step for every m.
module dagc_power_detector_tb;
  localparam int RSSI_W = 10;
  localparam int M_W    = 3;
  localparam int FRAC   = 7;

  logic              clk = 1'b0;
  logic              rst;
  logic              in_valid;
  logic [RSSI_W-1:0] rssi;
  logic [M_W-1:0]    m;
  logic              out_valid;
  logic [RSSI_W-1:0] pn;

  int checks = 0, failures = 0;
  longint y_ref;
  bit exp_valid;

  dagc_power_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floordiv(longint a, longint b);
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  function automatic int ref_pn(longint y);
    longint r = (y + (1 << (FRAC - 1))) / (1 << FRAC);
    return (r > 1023) ? 1023 : int'(r);
  endfunction

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s t=%0t pn=%0d ref=%0d y_ref=%0d", what, $time, pn, ref_pn(y_ref), y_ref);
    end
  endtask

  // One clock: apply inputs, update the model, compare after the edge.
  task automatic step(bit v, int x, int mm);
    in_valid <= v;
    rssi     <= RSSI_W'(x);
    m        <= M_W'(mm);
    @(posedge clk);
    if (v) y_ref = y_ref + floordiv(longint'(x) * (1 << FRAC) - y_ref, longint'(1) << mm);
    exp_valid = v;
    #1;
    check("valid", out_valid == exp_valid);
    check("pn", int'(pn) == ref_pn(y_ref));
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; rssi = '0; m = '0;
    y_ref = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    check("reset pn", pn == '0);

    // Random stream with random m and gaps.
    begin
      int mm = 2;
      for (int i = 0; i < 20000; i++) begin
        if ($urandom_range(0, 199) == 0) mm = $urandom_range(0, 7);
        step($urandom_range(0, 3) != 0, $urandom_range(0, 1023), mm);
      end
    end

    // Step response: constant input is reached for every m.
    for (int mm = 0; mm < 8; mm++) begin
      automatic int target = $urandom_range(0, 1023);
      for (int i = 0; i < 40 * (1 << mm); i++) step(1'b1, target, mm);
      check("converged", (int'(pn) - target) <= 1 && (target - int'(pn)) <= 1);
    end

    // alpha = 1 (m = 0): output follows the input immediately.
    step(1'b1, 777, 0);
    check("m=0 follows", pn == 10'd777);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
