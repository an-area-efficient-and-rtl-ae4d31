`timescale 1ps/1fs
// tb_dll_deskew_top: end-to-end test of the master DLL with its two per-pin
// DCPS-90 phase shifters, all parameters at their defaults.
//
// Phase 1 (800 MHz, +-10 ps cycle-to-cycle jitter, NUM0 = 2, NUM1 = 4):
// acquisition from reset through the UP search, the DN search, step-halving
// convergence and lock. Then each pin signal is toggled and the delay from
// d_int to d_ext, less the 2*T_CDU intrinsic delay, is compared with a
// quarter period plus the pin's trim (trim 0 and +10 fine steps).
// Phase 2: the reference period grows by 4 % (50 ps, more than the SPPD
// window); the locked loop must follow it with +-1 corrections until the
// CLK_DLY edge is back inside the +-30 ps window, and the pins must follow
// the new quarter period (within a quarter of the window).
// Phase 3: reset and lock at 1.6 GHz, pins checked again.
// It counts how often each mechanism happened and fails if one never did:
// UP-search and DN-search steps, step halvings, lock, locked corrections,
// SAPD and SPPD decisions, samples the SPPD window ignored, votes cancelled
// in the consecutive decision, samples dropped during code changes, and
// trims applied to the pins.
module tb_dll_deskew_top;
  import dll_pkg::*;
  localparam real T     = 67.0;
  localparam real DSTEP = T / 32.0;
  localparam real INTR  = 2.0 * T;

  logic              clk_ref, rst_n, clk_dly, lock;
  logic [3:0]        num0, num1;
  logic signed [5:0] trim [2];
  logic [1:0]        d_int, d_ext;
  logic [11:0]       code360;
  logic [9:0]        code90 [2];
  ctrl_state_e       st;

  real period, jitter;
  real tol = 4.0 * DSTEP;   // pin delay tolerance
  int checks = 0, failures = 0;

  // mechanism counters
  int n_srch_up, n_srch_dn, n_halve, n_lock, n_track, n_sapd_dec, n_sppd_dec;
  int n_window, n_cancel, n_hold, n_trim;

  dll_deskew_top dut (
    .clk_ref(clk_ref), .rst_n(rst_n), .num0(num0), .num1(num1), .trim(trim),
    .d_int(d_int), .d_ext(d_ext), .clk_dly(clk_dly), .code360(code360),
    .code90(code90), .lock(lock), .dll_state(st));

  initial begin
    #(2.0e8);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference clock with uniform cycle-to-cycle jitter of +-jitter
  initial begin
    clk_ref = 0;
    forever begin
      automatic real j = (jitter > 0.0)
        ? (real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * jitter : 0.0;
      #(period / 2.0 + j / 2.0); clk_ref = 1;
      #(period / 2.0 + j / 2.0); clk_ref = 0;
    end
  end

  // observe the mechanisms on the controller clock
  logic [11:0] step_q;
  ctrl_state_e st_q;
  always begin
    @(posedge dut.clk_ctrl);
    #1;
    if (rst_n) begin
      if (st == ST_SRCH_UP && st_q == ST_SRCH_UP && dut.u_dll.u_ctrl.upd) n_srch_up++;
      if (st == ST_SRCH_DN) n_srch_dn++;
      if (dut.u_dll.u_ctrl.step < step_q) n_halve++;
      if (st == ST_LOCKED && st_q != ST_LOCKED) n_lock++;
      if (st_q == ST_LOCKED && (dut.u_dll.up || dut.u_dll.dn)) n_track++;
    end
    st_q = st;
    step_q = dut.u_dll.u_ctrl.step;
  end
  always begin
    @(posedge dut.clk_ctrl);
    if (rst_n) begin
      if (!lock && (dut.u_dll.u_pd.up0 || dut.u_dll.u_pd.dn0)) n_sapd_dec++;
      if (lock && (dut.u_dll.u_pd.up1 || dut.u_dll.u_pd.dn1)) n_sppd_dec++;
      if (lock && !dut.u_dll.u_pd.up1 && !dut.u_dll.u_pd.dn1) n_window++;
      if (dut.u_dll.u_pd.u_decision.acc > 0 && dut.u_dll.u_pd.dnw && !dut.u_dll.upd) n_cancel++;
      if (dut.u_dll.u_pd.u_decision.acc < 0 && dut.u_dll.u_pd.upw && !dut.u_dll.upd) n_cancel++;
      if (dut.u_dll.upd) n_hold++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_lock(input int max_ctrl);
    int n = 0;
    while (!lock && n < max_ctrl) begin @(posedge dut.clk_ctrl); n++; end
    chk(lock, $sformatf("LOCK at period %0.1f", period));
    $display("period %0.1f ps: locked after %0d controller cycles, CODE360 = %0d (one period = %0.1f)",
             period, n, code360, period / DSTEP);
  endtask

  // toggle both pins and compare each output edge with the target
  task automatic check_pins(input int n_edges, input string what);
    real worst [2];
    worst = '{0.0, 0.0};
    for (int e = 0; e < n_edges; e++) begin
      real t0;
      real t_out [2];
      d_int = ~d_int;
      t0 = $realtime;
      t_out = '{-1.0, -1.0};
      fork
        begin @(d_ext[0]); t_out[0] = $realtime; end
        begin @(d_ext[1]); t_out[1] = $realtime; end
        begin #(INTR + 1024.0 * DSTEP + 100.0); end
      join
      for (int i = 0; i < 2; i++) begin
        real want, got, e_ps;
        want = INTR + period / 4.0 + real'(trim[i]) * DSTEP;
        got  = t_out[i] - t0;
        e_ps = (got > want) ? got - want : want - got;
        if (e_ps > worst[i]) worst[i] = e_ps;
        // quarter-code truncation, +-2 lock steps / 4, jitter-free path
        chk(t_out[i] > 0.0 && e_ps < tol,
            $sformatf("%s pin %0d delay %0.2f ps, target %0.2f ps", what, i, got, want));
        if (trim[i] != 0) n_trim++;
      end
      #(137.0);
    end
    $display("  %s: worst pin error %0.2f / %0.2f ps (%0.2f / %0.2f deg)", what, worst[0], worst[1],
             worst[0] / period * 360.0, worst[1] / period * 360.0);
  endtask

  initial begin
    int ideal;
    {n_srch_up, n_srch_dn, n_halve, n_lock, n_track, n_sapd_dec, n_sppd_dec} = '0;
    {n_window, n_cancel, n_hold, n_trim} = '0;
    st_q = ST_INIT; step_q = 0;
    period = 1250.0; jitter = 10.0;
    num0 = 2; num1 = 4;
    trim = '{6'sd0, 6'sd10};
    d_int = '0;
    rst_n = 0;
    #(20.0 * period);
    rst_n = 1;

    // phase 1: 800 MHz
    wait_lock(2000);
    ideal = int'(period / DSTEP);
    chk(int'(code360) >= ideal - 3 && int'(code360) <= ideal + 3, "one-period code at 800 MHz");
    repeat (20) @(posedge dut.clk_ctrl);
    check_pins(40, "800 MHz");

    // phase 2: period +4 %, the locked loop tracks
    period = 1300.0;
    repeat (400) @(posedge dut.clk_ctrl);
    chk(lock && real'(code360) * DSTEP >= period - 30.0 - DSTEP
             && real'(code360) * DSTEP <= period + 30.0 + DSTEP,
        $sformatf("tracked to code %0d (one period %0.1f)", code360, period / DSTEP));
    tol = 30.0 / 4.0 + 4.0 * DSTEP;
    check_pins(40, "800 MHz - 4 %");
    tol = 4.0 * DSTEP;

    // phase 3: 1.6 GHz from reset
    rst_n = 0;
    period = 625.0;
    trim = '{-6'sd5, 6'sd20};
    #(20.0 * period);
    rst_n = 1;
    wait_lock(2000);
    ideal = int'(period / DSTEP);
    chk(int'(code360) >= ideal - 3 && int'(code360) <= ideal + 3, "one-period code at 1.6 GHz");
    repeat (20) @(posedge dut.clk_ctrl);
    check_pins(40, "1.6 GHz");

    $display("mechanisms: up-search %0d, dn-search %0d, halvings %0d, locks %0d, locked corrections %0d",
             n_srch_up, n_srch_dn, n_halve, n_lock, n_track);
    $display("            SAPD samples %0d, SPPD samples %0d, window-ignored %0d, cancelled votes %0d, dropped %0d, trimmed edges %0d",
             n_sapd_dec, n_sppd_dec, n_window, n_cancel, n_hold, n_trim);
    chk(n_srch_up > 0,  "UP search happened");
    chk(n_srch_dn > 0,  "DN search happened");
    chk(n_halve >= 10,  "step halving happened");
    chk(n_lock == 2,    "locked twice");
    chk(n_track > 0,    "locked corrections happened");
    chk(n_sapd_dec > 0, "SAPD decisions happened");
    chk(n_sppd_dec > 0, "SPPD decisions happened");
    chk(n_window > 0,   "SPPD window ignored samples");
    chk(n_cancel > 0,   "consecutive decision cancelled votes");
    chk(n_hold > 0,     "samples dropped during code changes");
    chk(n_trim > 0,     "per-pin trim applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
