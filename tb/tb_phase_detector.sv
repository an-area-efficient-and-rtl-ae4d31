`timescale 1ps/1fs
// tb_phase_detector: CLK_INT and CLK_DLY at a chosen offset (1.6 GHz), the
// controller clock at 1/8. Before lock (SAPD, NUM0) any late/early offset,
// even 10 ps, gives UP/DN decisions at one per NUM0 samples; after lock
// (SPPD, NUM1) offsets inside the +-30 ps window give none and offsets
// outside give decisions at one per NUM1 samples; a +-50 ps back-and-forth
// jitter gives none with either detector; random jitter of up to +-25 ps
// gives none once locked (window).
module tb_phase_detector;
  localparam real P = 625.0;
  logic       clk_int, clk_dly, clk, rst_n, lock, hold, up, dn;
  logic [3:0] num0, num1;
  real        offs;
  bit         alt, rnd;
  int         nper = 0;
  int checks = 0, failures = 0;
  int n_up, n_dn;

  phase_detector #(.NUM_W(4)) dut (
    .clk_int(clk_int), .clk_dly(clk_dly), .clk(clk), .rst_n(rst_n), .lock(lock), .hold(hold),
    .num0(num0), .num1(num1), .up(up), .dn(dn));

  initial begin
    #(1.0e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CLK_INT, CLK_DLY = CLK_INT + offs (+-offs alternating when alt)
  initial begin
    clk_int = 0; clk_dly = 0;
    forever begin
      automatic real o = offs;
      if (alt) o = ((nper / 8) % 2 == 1) ? -offs : offs;
      if (rnd) o = real'($urandom_range(0, 2 * int'(offs))) - offs;
      nper++;
      fork
        begin #(P / 2.0); clk_int = 1; #(P / 2.0); clk_int = 0; end
        begin #(P / 2.0 + o); clk_dly = 1; #(P / 2.0); clk_dly = 0; end
      join_none
      #(P);
    end
  end

  // controller clock: rising edges in the low phase of CLK_INT
  initial begin
    clk = 0;
    #(P / 2.0 + P * 0.25);
    forever begin #(4.0 * P); clk = ~clk; end
  end

  always begin @(posedge clk); #1; if (up) n_up++; if (dn) n_dn++; end

  task automatic run(input real o, input bit a, input logic l, input int cycles,
                     input int exp_up, input int exp_dn, input string what);
    offs = o; alt = a; lock = l; rnd = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); hold = 1;
    @(negedge clk); hold = 0;
    n_up = 0; n_dn = 0;
    repeat (cycles) @(posedge clk);
    #2;
    checks++;
    if (n_up < exp_up - 1 || n_up > exp_up + 1 || n_dn < exp_dn - 1 || n_dn > exp_dn + 1) begin
      failures++;
      $display("FAIL %s: %0d UP, %0d DN, expected about %0d, %0d", what, n_up, n_dn, exp_up, exp_dn);
    end
  endtask

  initial begin
    rst_n = 0; lock = 0; hold = 0; num0 = 2; num1 = 4; offs = 100.0; alt = 0;
    #(20.0 * P);
    rst_n = 1;
    run( 100.0, 0, 0, 60, 30, 0, "SAPD late");
    run(-100.0, 0, 0, 60, 0, 30, "SAPD early");
    run(  10.0, 0, 0, 60, 30, 0, "SAPD small late");
    run( -10.0, 0, 0, 60, 0, 30, "SAPD small early");
    run(  10.0, 0, 1, 60, 0, 0, "SPPD inside window");
    run( -20.0, 0, 1, 60, 0, 0, "SPPD inside window early");
    run( 100.0, 0, 1, 60, 15, 0, "SPPD late");
    run(-100.0, 0, 1, 60, 0, 15, "SPPD early");
    num0 = 8; num1 = 8;
    run(  50.0, 1, 0, 200, 0, 0, "SAPD alternating jitter, NUM0 = 8");
    run(  50.0, 1, 1, 200, 0, 0, "SPPD alternating jitter, NUM1 = 8");
    // random jitter inside the window, locked
    offs = 25.0; alt = 0; rnd = 1; lock = 1; num1 = 1;
    repeat (3) @(posedge clk);
    n_up = 0; n_dn = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (n_up != 0 || n_dn != 0) begin failures++; $display("FAIL window jitter gave %0d/%0d", n_up, n_dn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
