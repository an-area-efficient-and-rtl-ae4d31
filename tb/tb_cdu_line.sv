`timescale 1ps/1fs
// tb_cdu_line: delay of the coarse line for every thermometer length of the
// default 128-stage line, (1 + m) * T_CDU, and a thermometer word with a
// bubble (the run of ones from bit 0 counts).
module tb_cdu_line;
  localparam int unsigned N = 128;
  localparam real T = 67.0;
  logic         in, out;
  logic [N-1:0] c;
  real          t_in, t_out;
  int checks = 0, failures = 0;

  cdu_line #(.N(N), .T_CDU(T)) dut (.in(in), .c_therm(c), .out(out));

  always begin @(out); t_out = $realtime; end

  task automatic measure(input int m_exp);
    real d;
    in = ~in;
    t_in = $realtime;
    #(T * (N + 2));
    d = t_out - t_in;
    checks++;
    if (out !== in || d < T * (m_exp + 1) - 0.002 || d > T * (m_exp + 1) + 0.002) begin
      failures++;
      $display("FAIL m=%0d delay %0.3f expected %0.3f", m_exp, d, T * (m_exp + 1));
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0;
    c  = '0;
    #1000;
    for (int m = 0; m < N; m++) begin
      c = (N'(1) << m) - 1;
      measure(m);
      measure(m);
    end
    c = N'(32'h0000_F0FF);  // run of 8 ones, then a bubble
    measure(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
