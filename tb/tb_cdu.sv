`timescale 1ps/1fs
// tb_cdu: checks that a CDU delays rising and falling edges by T_CDU, also
// for a pulse shorter than the delay (transport behaviour).
module tb_cdu;
  localparam real T = 67.0;
  logic in, out;
  real  t_in, t_out;
  int checks = 0, failures = 0;

  cdu #(.T_CDU(T)) dut (.in(in), .out(out));

  always begin @(out); t_out = $realtime; end

  task automatic edge_check(input logic v);
    in = v;
    t_in = $realtime;
    #200;
    checks++;
    if (out !== v || (t_out - t_in) < T - 0.002 || (t_out - t_in) > T + 0.002) begin
      failures++;
      $display("FAIL edge %b delay %0.3f ps (in %0.3f out %0.3f)", v, t_out - t_in, t_in, t_out);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0;
    #300;
    for (int i = 0; i < 4; i++) begin
      edge_check(1);
      edge_check(0);
    end
    // 30 ps pulse must come out 30 ps wide, 67 ps later
    in = 1; #30; in = 0;
    #(T - 30.0 + 0.5);
    checks++;
    if (out !== 1) begin failures++; $display("FAIL short pulse missing"); end
    #30;
    checks++;
    if (out !== 0) begin failures++; $display("FAIL short pulse too long"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
