`timescale 1ps/1fs
// tb_dll_ctrl: the controller against an ideal loop model. The model delay
// is code * T_CDU/32 and the detector says UP when that delay modulo the
// period is below half a period, DN otherwise; each decision is followed by
// one idle cycle, as in the DLL where the sample taken during a code change
// is dropped. For several periods (200 MHz to 1.6 GHz) and start-up
// conditions it checks: the sequence of states INIT -> SRCH_UP -> SRCH_DN ->
// CONVERGE -> LOCKED; that the step halves on each direction change and
// LOCK rises when the step is 1; that the locked code is within one step of
// the one-period code (never a multiple of the period); that the code moves
// against the detector once locked; saturation at the top of the range when
// the period exceeds the line; and the number of cycles to lock.
module tb_dll_ctrl;
  import dll_pkg::*;
  localparam real DSTEP = 67.0 / 32.0;
  logic        clk, rst_n, up, dn, lock, upd;
  logic [11:0] code;
  ctrl_state_e state;
  int checks = 0, failures = 0;
  int n_halve = 0;

  dll_ctrl #(.K(12), .S_INIT(32)) dut (
    .clk(clk), .rst_n(rst_n), .up(up), .dn(dn), .code(code), .lock(lock), .upd(upd), .state(state));

  initial begin
    #(1.0e10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0;
    forever #2500 clk = ~clk;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (code=%0d state=%s)", what, code, state.name()); end
  endtask

  function automatic bit model_up(input int c, input real period);
    real ph;
    ph = real'(c) * DSTEP;
    ph = ph - period * $floor(ph / period);
    return ph < period / 2.0;
  endfunction

  // run one acquisition for the given period; returns cycles to lock
  task automatic acquire(input real period, input int max_cycles);
    int cyc_n, ideal, c_prev;
    ctrl_state_e s_prev;
    logic [11:0] step_prev;
    bit seen_up, seen_dn, seen_conv;
    rst_n = 0; up = 0; dn = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(code == 0 && state == ST_INIT && !lock, "reset values");
    seen_up = 0; seen_dn = 0; seen_conv = 0;
    s_prev = state;
    step_prev = dut.step;
    ideal = int'(period / DSTEP);
    cyc_n = 0;
    while (!lock && cyc_n < max_cycles) begin
      bit u;
      @(negedge clk);
      u = model_up(int'(code), period);
      up = u; dn = !u;
      c_prev = int'(code);
      @(posedge clk); #1;
      up = 0; dn = 0;
      cyc_n++;
      if (state == ST_SRCH_UP) seen_up = 1;
      if (state == ST_SRCH_DN) seen_dn = 1;
      if (state == ST_CONVERGE) seen_conv = 1;
      if (dut.step != step_prev) begin
        n_halve++;
        chk(dut.step == step_prev / 2, "step halves");
      end
      if (s_prev == ST_CONVERGE || s_prev == ST_LOCKED)
        chk(u ? (int'(code) < c_prev) : (int'(code) > c_prev), "moves against the detector");
      s_prev = state;
      step_prev = dut.step;
      @(negedge clk);   // idle cycle
      @(posedge clk); #1;
    end
    chk(lock, $sformatf("locked at period %0.1f", period));
    chk(seen_up && seen_dn && seen_conv, "went through search and convergence");
    chk(dut.step == 1, "step is 1 when locked");
    chk(int'(code) >= ideal - 2 && int'(code) <= ideal + 2,
        $sformatf("lock code %0d near one-period code %0d", code, ideal));
    $display("period %0.1f ps: locked at code %0d (ideal %0d) after %0d decisions", period, code, ideal, cyc_n);
    // stays within one step while tracking
    for (int i = 0; i < 40; i++) begin
      bit u;
      @(negedge clk);
      u = model_up(int'(code), period);
      up = u; dn = !u;
      @(posedge clk); #1;
      up = 0; dn = 0;
      chk(lock && int'(code) >= ideal - 2 && int'(code) <= ideal + 2, "tracking");
    end
  endtask

  initial begin
    rst_n = 0; up = 0; dn = 0;
    #10000;
    acquire(625.0, 400);     // 1.6 GHz
    acquire(1250.0, 400);    // 800 MHz
    acquire(2500.0, 400);    // 400 MHz
    acquire(5000.0, 400);    // 200 MHz
    acquire(777.7, 400);
    chk(n_halve >= 25, "step halving happened");
    // period beyond the line: the code saturates and never wraps
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); up = 1; dn = 0;
      @(posedge clk); #1;
    end
    up = 0;
    chk(code == 12'hFFF && state == ST_SRCH_UP, "saturation at the top");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
