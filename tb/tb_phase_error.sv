`timescale 1ps/1fs
// tb_phase_error: 90-degree phase error of the pin phase shifters against
// the reference frequency, 200 MHz to 1.6 GHz in 200 MHz steps, at the
// three process corners of the CDU step (fast 42.2 ps, typical 67.0 ps,
// slow 113.5 ps).
// Three copies of the design, one per corner, share one jitter-free
// reference clock, NUM0 = NUM1 = 1 and zero trim. For each frequency all
// three are reset and must lock. Then, over 100 controller cycles, 20 edges
// are sent through pin 0 of each copy and timed. The pin's phase is its
// measured delay minus the shifter's intrinsic delay of two CDU steps (the
// part that the master's replica also removes), and the phase error is the
// mean of that phase minus a quarter period, in degrees.
// Checks, per corner and frequency: lock within 2000 controller cycles;
// the lock code within the SPPD window (+-30 ps) plus one fine step of one
// period; the mean phase error within what the window and the truncation
// of the code to a quarter allow (30 ps / 4 plus one fine step).
// The test also checks that the lock code scales with the period: at
// every corner the 200 MHz code is 8x the 1.6 GHz code within the same
// tolerances.
module tb_phase_error;
  import dll_pkg::*;
  localparam int  NC              = 3;
  localparam real TC [NC]         = '{42.2, 67.0, 113.5};
  localparam real W               = 60.0;

  logic              clk_ref, rst_n;
  logic [3:0]        num0, num1;
  logic signed [5:0] trim [2];
  logic [1:0]        d_int;
  logic [1:0]        d_ext   [NC];
  logic              clk_dly [NC];
  logic              lock    [NC];
  logic [11:0]       code360 [NC];
  logic [9:0]        code90  [NC][2];
  ctrl_state_e       st      [NC];
  real period;
  int checks = 0, failures = 0;
  int code_lo [NC], code_hi [NC];

  dll_deskew_top #(.T_CDU(42.2)) dut_ff (
    .clk_ref(clk_ref), .rst_n(rst_n), .num0(num0), .num1(num1), .trim(trim),
    .d_int(d_int), .d_ext(d_ext[0]), .clk_dly(clk_dly[0]), .code360(code360[0]),
    .code90(code90[0]), .lock(lock[0]), .dll_state(st[0]));
  dll_deskew_top #(.T_CDU(67.0)) dut_tt (
    .clk_ref(clk_ref), .rst_n(rst_n), .num0(num0), .num1(num1), .trim(trim),
    .d_int(d_int), .d_ext(d_ext[1]), .clk_dly(clk_dly[1]), .code360(code360[1]),
    .code90(code90[1]), .lock(lock[1]), .dll_state(st[1]));
  dll_deskew_top #(.T_CDU(113.5)) dut_ss (
    .clk_ref(clk_ref), .rst_n(rst_n), .num0(num0), .num1(num1), .trim(trim),
    .d_int(d_int), .d_ext(d_ext[2]), .clk_dly(clk_dly[2]), .code360(code360[2]),
    .code90(code90[2]), .lock(lock[2]), .dll_state(st[2]));

  initial begin
    #(5.0e8);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_ref = 0;
    forever begin
      #(period / 2.0); clk_ref = 1;
      #(period / 2.0); clk_ref = 0;
    end
  end

  // edge times of pin 0 of each copy
  real t_out [NC];
  for (genvar c = 0; c < NC; c++) begin : g_mon
    always begin
      @(d_ext[c][0]);
      t_out[c] = $realtime;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_freq(input real p, output int code [NC]);
    int n;
    real t0;
    real sum [NC];
    period = p;
    rst_n = 0;
    #(20.0 * p);
    rst_n = 1;
    n = 0;
    while (!(lock[0] && lock[1] && lock[2]) && n < 2000) begin
      @(posedge dut_tt.clk_ctrl); n++;
    end
    for (int c = 0; c < NC; c++)
      chk(lock[c], $sformatf("lock at %0.1f ps, T_CDU %0.1f", p, TC[c]));
    repeat (10) @(posedge dut_tt.clk_ctrl);
    for (int c = 0; c < NC; c++) sum[c] = 0.0;
    for (int e = 0; e < 20; e++) begin
      repeat (5) @(posedge dut_tt.clk_ctrl);
      #7;
      d_int[0] = ~d_int[0];
      t0 = $realtime;
      // longest pin delay: 2 + 1023/32 CDU steps of the slow corner
      #(34.0 * TC[2]);
      for (int c = 0; c < NC; c++) sum[c] += t_out[c] - t0 - 2.0 * TC[c];
    end
    for (int c = 0; c < NC; c++) begin
      real step, phase, err_ps, err_deg, ideal;
      step    = TC[c] / 32.0;
      ideal   = p / step;
      phase   = sum[c] / 20.0;
      err_ps  = phase - p / 4.0;
      err_deg = err_ps / p * 360.0;
      code[c] = int'(code360[c]);
      $display("%6.1f MHz  T_CDU %5.1f ps: code360 %4d (one period %7.1f), code90 %3d, phase error %6.2f ps = %5.2f deg",
               1.0e6 / p, TC[c], code360[c], ideal, code90[c][0], err_ps, err_deg);
      chk(real'(code360[c]) > ideal - W / 2.0 / step - 1.0 &&
          real'(code360[c]) < ideal + W / 2.0 / step + 1.0,
          $sformatf("lock code %0d at %0.1f ps, T_CDU %0.1f", code360[c], p, TC[c]));
      chk((err_ps < 0.0 ? -err_ps : err_ps) <= W / 8.0 + step,
          $sformatf("phase error %0.2f ps at %0.1f ps, T_CDU %0.1f", err_ps, p, TC[c]));
    end
  endtask

  initial begin
    int code [NC];
    num0 = 4'd1; num1 = 4'd1;
    trim[0] = '0; trim[1] = '0;
    d_int = '0;
    rst_n = 0;
    period = 5000.0;
    for (int f = 200; f <= 1600; f += 200) begin
      one_freq(1.0e6 / real'(f), code);
      for (int c = 0; c < NC; c++) begin
        if (f == 200)  code_lo[c] = code[c];
        if (f == 1600) code_hi[c] = code[c];
      end
    end
    for (int c = 0; c < NC; c++) begin
      real tol;
      tol = 8.0 * (W / 2.0 / (TC[c] / 32.0) + 1.0) + (W / 2.0 / (TC[c] / 32.0) + 1.0);
      chk(real'(code_lo[c]) > 8.0 * real'(code_hi[c]) - tol &&
          real'(code_lo[c]) < 8.0 * real'(code_hi[c]) + tol,
          $sformatf("code scaling %0d vs 8 x %0d, T_CDU %0.1f", code_lo[c], code_hi[c], TC[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
