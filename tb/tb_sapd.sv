`timescale 1ps/1fs
// tb_sapd: CLK_DLY is placed at offsets from -200 ps to +200 ps around the
// CLK_INT rising edge (1.6 GHz clocks). Late CLK_DLY must give up0=1/dn0=0,
// early CLK_DLY up0=0/dn0=1, outputs valid T_PUL after the edge and held
// through the low phase of CLK_INT.
module tb_sapd;
  localparam real P = 625.0;
  logic clk_int, clk_dly, up0, dn0;
  real  offs;
  int checks = 0, failures = 0;

  sapd #(.T_PUL(20.0)) dut (.clk_int(clk_int), .clk_dly(clk_dly), .up0(up0), .dn0(dn0));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_int = 0;
    clk_dly = 0;
    #1000;
    for (int k = -20; k <= 20; k++) begin
      if (k == 0) continue;
      offs = 10.0 * real'(k);
      // four cycles with CLK_DLY offset by offs from CLK_INT
      for (int c = 0; c < 4; c++) begin
        fork
          begin #(P / 2.0); clk_int = 1; #(P / 2.0); clk_int = 0; end
          begin #(P / 2.0 + offs); clk_dly = 1; #(P / 2.0); clk_dly = 0; end
        join
        #(P / 2.0 - ((offs > 0.0) ? offs : 0.0));
        // CLK_INT is low again here: the result must still be held
        checks++;
        if (up0 !== (offs > 0.0) || dn0 !== (offs < 0.0)) begin
          failures++;
          $display("FAIL offset %0.1f: up0=%b dn0=%b", offs, up0, dn0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
