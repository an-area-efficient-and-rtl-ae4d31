`timescale 1ps/1fs
// tb_phase_variation: phase variation of a DCPS-90 output under reference
// clock jitter, for the consecutive-decision settings NUM0 = NUM1 = 1, 2, 4
// and 8, at 200 MHz (jitter 50, 150, 300 ps) and 1.6 GHz (jitter 10, 50,
// 100 ps). Jitter: each reference period deviates by a uniform random
// amount of up to +-J/2, so adjacent periods differ by at most J.
// For each case the design is reset and must lock; then for 300 controller
// cycles the pin-0 delay set by its code, code90 * T_CDU/32 above the
// intrinsic 2 * T_CDU, is compared with a quarter of the nominal period. The
// phase variation is the largest difference seen, in degrees. Every 20
// cycles one pin edge is timed to confirm that the delay matches the code.
// Checks: lock in every case; variation below 15 degrees; NUM = 8 gives no
// more variation than NUM = 1, within one fine step.
module tb_phase_variation;
  import dll_pkg::*;
  localparam real T     = 67.0;
  localparam real DSTEP = T / 32.0;

  logic              clk_ref, rst_n, clk_dly, lock;
  logic [3:0]        num0, num1;
  logic signed [5:0] trim [2];
  logic [1:0]        d_int, d_ext;
  logic [11:0]       code360;
  logic [9:0]        code90 [2];
  ctrl_state_e       st;
  real period, jitter;
  int checks = 0, failures = 0;

  dll_deskew_top dut (
    .clk_ref(clk_ref), .rst_n(rst_n), .num0(num0), .num1(num1), .trim(trim),
    .d_int(d_int), .d_ext(d_ext), .clk_dly(clk_dly), .code360(code360),
    .code90(code90), .lock(lock), .dll_state(st));

  initial begin
    #(1.0e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_ref = 0;
    forever begin
      automatic real j = (real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * jitter / 2.0;
      #(period / 2.0 + j / 2.0); clk_ref = 1;
      #(period / 2.0 + j / 2.0); clk_ref = 0;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask


  task automatic one_case(input real p, input real jit, input int num, output real var_deg);
    int n;
    real worst, e;
    period = p; jitter = jit;
    num0 = 4'(num); num1 = 4'(num);
    rst_n = 0;
    #(20.0 * p);
    rst_n = 1;
    n = 0;
    while (!lock && n < 6000) begin @(posedge dut.clk_ctrl); n++; end
    chk(lock, $sformatf("lock at %0.0f ps, jitter %0.0f, NUM %0d", p, jit, num));
    repeat (10) @(posedge dut.clk_ctrl);
    worst = 0.0;
    for (int c = 0; c < 300; c++) begin
      @(posedge dut.clk_ctrl); #1;
      e = real'(code90[0]) * DSTEP - p / 4.0;
      if (e < 0.0) e = -e;
      if (e > worst) worst = e;
      if (c % 20 == 0) begin
        real t0, t1;
        d_int[0] = ~d_int[0];
        t0 = $realtime;
        @(d_ext[0]);
        t1 = $realtime;
        chk(t1 - t0 > 2.0 * T + real'(code90[0]) * DSTEP - 0.01 &&
            t1 - t0 < 2.0 * T + real'(code90[0]) * DSTEP + 0.01, "pin delay matches its code");
      end
    end
    var_deg = worst / p * 360.0;
    chk(var_deg < 15.0, $sformatf("variation %0.2f deg", var_deg));
  endtask

  initial begin
    real pers [2] = '{5000.0, 625.0};
    real jits [2][3] = '{'{50.0, 150.0, 300.0}, '{10.0, 50.0, 100.0}};
    int  nums [4] = '{1, 2, 4, 8};
    real v [4];
    trim = '{6'sd0, 6'sd0};
    d_int = '0;
    period = 625.0; jitter = 0.0;
    for (int f = 0; f < 2; f++) begin
      for (int j = 0; j < 3; j++) begin
        for (int k = 0; k < 4; k++) one_case(pers[f], jits[f][j], nums[k], v[k]);
        $display("%0.0f MHz, jitter %0.0f ps: phase variation NUM=1 %0.2f, NUM=2 %0.2f, NUM=4 %0.2f, NUM=8 %0.2f deg",
                 1.0e6 / pers[f], jits[f][j], v[0], v[1], v[2], v[3]);
        chk(v[3] <= v[0] + DSTEP / pers[f] * 360.0 + 0.01, "NUM = 8 no worse than NUM = 1 (within one fine step)");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
