`timescale 1ps/1fs
// tb_master_dll: the complete master DLL (12-bit DCPS-360, T_CDU = 67 ps)
// locks from reset at 1.6 GHz, 800 MHz and 200 MHz, the ends of its
// operating range. Checks: LOCK rises; the locked code is within two fine
// steps of period / (T_CDU/32), i.e. one period and not a multiple; CLK_DLY
// rising edges then fall within a few fine steps of CLK_INT rising edges;
// the code stays there while locked; the controller clock is 1/8 of CLK_REF;
// the lock time is reported.
module tb_master_dll;
  import dll_pkg::*;
  localparam real DSTEP = 67.0 / 32.0;
  logic        clk_ref, rst_n, clk_dly, clk_ctrl, lock;
  logic [11:0] code;
  logic [3:0]  num0, num1;
  ctrl_state_e state;
  real         period;
  real         t_int, err, max_err;
  int checks = 0, failures = 0;
  int n_ctrl, n_ref;

  master_dll dut (
    .clk_ref(clk_ref), .rst_n(rst_n), .num0(num0), .num1(num1),
    .clk_dly(clk_dly), .clk_ctrl(clk_ctrl), .code(code), .lock(lock), .state(state));

  initial begin
    #(5.0e8);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_ref = 0;
    forever begin #(period / 2.0); clk_ref = ~clk_ref; end
  end

  always begin @(posedge dut.clk_int); t_int = $realtime; end
  always begin @(posedge clk_ctrl); n_ctrl++; end
  always begin @(posedge clk_ref); n_ref++; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input real p);
    int ideal, ncyc, locked_code;
    period = p;
    ideal = int'(p / DSTEP);
    rst_n = 0;
    #(10.0 * p);
    rst_n = 1;
    n_ctrl = 0;
    ncyc = 0;
    while (!lock && ncyc < 3000) begin @(posedge clk_ctrl); ncyc++; end
    chk(lock, $sformatf("lock at period %0.1f", p));
    locked_code = int'(code);
    chk(locked_code >= ideal - 2 && locked_code <= ideal + 2,
        $sformatf("code %0d vs one-period code %0d at period %0.1f", code, ideal, p));
    $display("period %0.1f ps: LOCK after %0d controller cycles, code %0d (one period = %0.1f fine steps)",
             p, ncyc, code, p / DSTEP);
    // static phase error while locked
    max_err = 0.0;
    n_ref = 0; n_ctrl = 0;
    repeat (400) begin
      @(posedge clk_dly);
      err = $realtime - t_int;
      if (err > p / 2.0) err = err - p;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
    end
    chk(max_err < 4.0 * DSTEP, $sformatf("CLK_DLY within %0.2f ps of CLK_INT", max_err));
    chk(lock && int'(code) >= ideal - 2 && int'(code) <= ideal + 2, "stays locked");
    chk(n_ref >= 8 * n_ctrl - 8 && n_ref <= 8 * n_ctrl + 8, "controller clock is CLK_REF/8");
    $display("  max |CLK_DLY - CLK_INT| over 400 cycles: %0.2f ps", max_err);
  endtask

  initial begin
    num0 = 1; num1 = 2;
    period = 625.0;
    rst_n = 0;
    run(625.0);    // 1.6 GHz
    run(1250.0);   // 800 MHz
    run(5000.0);   // 200 MHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
