// Testbench for dagc_power_calc.
//
// Applies random averaged RSSI values and random signed slope and offset,
// and compares Pc with Beta*Pn + A0 computed in 64-bit integers. Checks the
// one-cycle latency, that Pc holds when no sample is valid, and the
// extreme corners of both coefficients.
module dagc_power_calc_tb;
  localparam int RSSI_W = 10, BETA_W = 16, A0_W = 18, PC_W = 28;

  logic                     clk = 1'b0;
  logic                     rst;
  logic                     in_valid;
  logic        [RSSI_W-1:0] pn;
  logic signed [BETA_W-1:0] beta;
  logic signed [A0_W-1:0]   a0;
  logic                     out_valid;
  logic signed [PC_W-1:0]   pc;

  int checks = 0, failures = 0;
  longint exp_pc;

  dagc_power_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s pn=%0d beta=%0d a0=%0d pc=%0d exp=%0d", what, pn, beta, a0, pc, exp_pc);
    end
  endtask

  task automatic apply(bit v, int p, int b, int a);
    in_valid <= v;
    pn       <= RSSI_W'(p);
    beta     <= BETA_W'(b);
    a0       <= A0_W'(a);
    @(posedge clk);
    if (v) exp_pc = longint'(b) * longint'(p) + longint'(a);
    #1;
    check("valid", out_valid == v);
    check("pc", longint'(pc) == exp_pc);
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; pn = '0; beta = '0; a0 = '0;
    exp_pc = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    for (int i = 0; i < 20000; i++)
      apply($urandom_range(0, 3) != 0, $urandom_range(0, 1023),
            $urandom_range(0, 65535) - 32768, $urandom_range(0, 262143) - 131072);

    apply(1, 1023, -32768, -131072);
    apply(1, 1023, 32767, 131071);
    apply(1, 0, 32767, -5);
    // Reset calibration: Pc = 30 - RSSI/24 VGA steps at 10 fraction bits.
    apply(1, 480, -43, 30720);
    check("calibration", (pc >>> 10) == 28'sd9);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
