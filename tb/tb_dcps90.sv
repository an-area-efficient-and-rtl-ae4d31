`timescale 1ps/1fs
// tb_dcps90: delay of the DCPS in the 10-bit DCPS-90 phase shifter configuration for every code,
// rising and falling edges: (2 + code / 32) * T_CDU, hence a linear,
// monotonic characteristic with a T_CDU/32 step; also checks that a code
// change reaches the output with the next edge that enters.
module tb_dcps90;
  localparam int unsigned K = 10;
  localparam real T = 67.0;
  localparam real T_MAX = T * (2.0 + real'(2**K) / 32.0);
  logic         in, out;
  logic [K-1:0] code;
  real          t_in, t_out, d, d_prev;
  int checks = 0, failures = 0;

  dcps #(.K(K), .T_CDU(T)) dut (.in(in), .code(code), .out(out));

  always begin @(out); t_out = $realtime; end

  task automatic measure(output real dly);
    in = ~in;
    t_in = $realtime;
    #(T_MAX + 100.0);
    dly = t_out - t_in;
    checks++;
    if (out !== in) begin
      failures++;
      $display("FAIL code %0d: output did not follow", code);
    end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0;
    code = '0;
    d_prev = 0.0;
    #(T_MAX + 100.0);
    for (int c = 0; c < 2**K; c++) begin
      real want;
      code = K'(c);
      want = T * (2.0 + real'(c) / 32.0);
      for (int e = 0; e < 2; e++) begin
        measure(d);
        checks++;
        if (d < want - 0.005 || d > want + 0.005) begin
          failures++;
          $display("FAIL code %0d edge %0d delay %0.3f expected %0.3f", c, e, d, want);
        end
      end
      if (c > 0) begin
        checks++;
        if (d - d_prev < T / 32.0 - 0.01 || d - d_prev > T / 32.0 + 0.01) begin
          failures++;
          $display("FAIL step at code %0d is %0.3f ps", c, d - d_prev);
        end
      end
      d_prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
