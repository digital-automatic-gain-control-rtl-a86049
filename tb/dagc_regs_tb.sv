// Testbench for dagc_regs.
//
// Checks the reset defaults, then writes random values to random addresses
// (including unused ones) and compares both the cfg outputs and the read
// port with a model of the register map, including truncation to each
// field's width and sign extension of Beta and A0 on read-back.
module dagc_regs_tb;
  import dagc_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  logic              we;
  logic [REG_AW-1:0] addr;
  logic [REG_DW-1:0] wdata;
  logic [REG_DW-1:0] rdata;
  dagc_cfg_t         cfg;

  int checks = 0, failures = 0;
  longint model[8];
  int widths[8] = '{M_W, BETA_W, A0_W, VGA_W, LVL_W, LVL_W, N_W, 0};

  dagc_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint field(int a);
    case (a)
      0: return longint'(cfg.m);
      1: return longint'(cfg.beta);
      2: return longint'(cfg.a0);
      3: return longint'(cfg.vga_max);
      4: return longint'(cfg.level_med);
      5: return longint'(cfg.level_low);
      6: return longint'(cfg.n_settle);
      default: return 0;
    endcase
  endfunction

  function automatic longint readback(longint v, int a);
    // signed fields are sign-extended to 18 bits, others zero-extended
    if (a == 1 || a == 2) return v & ((1 << REG_DW) - 1);
    return v;
  endfunction

  task automatic check_all(string what);
    for (int a = 0; a < 8; a++) begin
      addr = REG_AW'(a);
      #1;
      checks++;
      if (field(a) != model[a] || longint'(rdata) != readback(model[a], a)) begin
        failures++;
        $display("FAIL %s addr=%0d field=%0d rdata=%0d model=%0d", what, a, field(a), rdata, model[a]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; addr = '0; wdata = '0;
    model[0] = 2; model[1] = -43; model[2] = 30720; model[3] = 26;
    model[4] = 8; model[5] = 16; model[6] = 32; model[7] = 0;
    repeat (2) @(posedge clk);
    #1;
    check_all("reset");
    rst = 1'b0;

    for (int i = 0; i < 2000; i++) begin
      automatic int a = $urandom_range(0, 7);
      automatic int d = $urandom_range(0, (1 << REG_DW) - 1);
      @(negedge clk);
      we = 1'b1; addr = REG_AW'(a); wdata = REG_DW'(d);
      @(posedge clk);
      if (a != 7) begin
        automatic longint v = d & ((1 << widths[a]) - 1);
        if ((a == 1 || a == 2) && v >= (longint'(1) << (widths[a] - 1))) v -= longint'(1) << widths[a];
        model[a] = v;
      end
      #1;
      we = 1'b0;
      if (i % 10 == 0) check_all("random");
    end
    check_all("final");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
