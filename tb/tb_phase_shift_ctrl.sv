`timescale 1ps/1fs
// tb_phase_shift_ctrl: random master codes and trims; each pin's code must be
// floor(code360 / 4) + trim, saturated to 0..1023, one clock after the inputs.
module tb_phase_shift_ctrl;
  localparam int N = 2;
  logic              clk, rst_n;
  logic [11:0]       code360;
  logic signed [5:0] trim [N];
  logic [9:0]        code90 [N];
  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0;

  phase_shift_ctrl #(.N_CH(N)) dut (.clk(clk), .rst_n(rst_n), .code360(code360), .trim(trim), .code90(code90));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0;
    forever #2500 clk = ~clk;
  end

  initial begin
    rst_n = 0;
    code360 = 0;
    trim = '{default: '0};
    #7000;
    checks++;
    if (code90[0] !== 0 || code90[1] !== 0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int e;
      @(negedge clk);
      case (it % 4)
        0: code360 = 12'($urandom_range(0, 40));      // low end
        1: code360 = 12'($urandom_range(4050, 4095)); // high end
        default: code360 = 12'($urandom);
      endcase
      for (int i = 0; i < N; i++) trim[i] = 6'($urandom);
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        e = int'(code360) / 4 + int'(trim[i]);
        if (e < 0) begin e = 0; n_lo++; end
        if (e > 1023) begin e = 1023; n_hi++; end
        checks++;
        if (int'(code90[i]) != e) begin
          failures++;
          $display("FAIL code360=%0d trim=%0d ch%0d got %0d expected %0d", code360, trim[i], i, code90[i], e);
        end
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
