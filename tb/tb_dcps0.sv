`timescale 1ps/1fs
// tb_dcps0: the DCPS-0 replica delays every edge by 2 * T_CDU, the same as a
// DCPS at code 0 (both are checked side by side, at two CDU steps).
module tb_dcps0;
  logic       in, out0, outd;
  real        t_in, t0, td;
  int checks = 0, failures = 0;
  real tcdu;

  dcps0 #(.T_CDU(67.0))  dut  (.in(in), .out(out0));
  dcps  #(.K(6), .T_CDU(67.0)) ref_line (.in(in), .code(6'd0), .out(outd));

  always begin @(out0); t0 = $realtime; end
  always begin @(outd); td = $realtime; end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0;
    tcdu = 67.0;
    #1000;
    for (int e = 0; e < 8; e++) begin
      in = ~in;
      t_in = $realtime;
      #700;
      checks++;
      if (out0 !== in || t0 - t_in < 2.0 * tcdu - 0.005 || t0 - t_in > 2.0 * tcdu + 0.005) begin
        failures++;
        $display("FAIL edge %0d delay %0.3f", e, t0 - t_in);
      end
      checks++;
      if (td - t0 > 0.005 || t0 - td > 0.005) begin
        failures++;
        $display("FAIL DCPS-0 %0.3f vs DCPS code 0 %0.3f", t0 - t_in, td - t_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
