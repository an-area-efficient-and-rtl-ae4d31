`timescale 1ps/1fs
// tb_sppd: CLK_DLY at offsets around the CLK_INT edge. Outside the 60 ps
// window (|offset| > 30 ps) late gives UP1 and early DN1; inside it both are
// 0. Checks the window edges at +-25 ps and +-35 ps and wide offsets.
module tb_sppd;
  localparam real P = 625.0;
  logic clk_int, clk_dly, up1, dn1;
  int checks = 0, failures = 0;
  int n_inside = 0;

  sppd #(.T_WIN(60.0)) dut (.clk_int(clk_int), .clk_dly(clk_dly), .up1(up1), .dn1(dn1));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real offs);
    for (int c = 0; c < 3; c++) begin
      fork
        begin #(P / 2.0); clk_int = 1; #(P / 2.0); clk_int = 0; end
        begin #(P / 2.0 + offs); clk_dly = 1; #(P / 2.0); clk_dly = 0; end
      join
      #(P / 2.0 - ((offs > 0.0) ? offs : 0.0));
      checks++;
      if (offs > 30.0) begin
        if (!(up1 && !dn1)) begin failures++; $display("FAIL late %0.1f: up1=%b dn1=%b", offs, up1, dn1); end
      end else if (offs < -30.0) begin
        if (!(!up1 && dn1)) begin failures++; $display("FAIL early %0.1f: up1=%b dn1=%b", offs, up1, dn1); end
      end else begin
        n_inside++;
        if (up1 || dn1) begin failures++; $display("FAIL inside %0.1f: up1=%b dn1=%b", offs, up1, dn1); end
      end
    end
  endtask

  initial begin
    clk_int = 0;
    clk_dly = 0;
    #1000;
    foreach (offs_list[i]) run(offs_list[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real offs_list[] = '{-200.0, -100.0, -35.0, -25.0, -10.0, 5.0, 25.0, 35.0, 100.0, 200.0, 40.0, -29.0};
endmodule
