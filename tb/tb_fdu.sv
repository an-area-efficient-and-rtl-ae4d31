`timescale 1ps/1fs
// tb_fdu: drives IN_a and IN_b = IN_a + one CDU and checks, for all 32 fine
// settings (f_sel, n path-b drivers), that the output edge lies at
// T_OUT + (16 * f_sel + n) * T_CDU / 32 after IN_a, with T_OUT = T_CDU.
// The enable words are built here from the driver count, not by the decoder.
module tb_fdu;
  localparam real T = 67.0;
  logic        in_a, in_b, f_sel, out;
  logic [15:0] f_a, f_b;
  real         t_a, t_out;
  int checks = 0, failures = 0;

  fdu #(.T_CDU(T)) dut (.in_a(in_a), .in_b(in_b), .f_sel(f_sel), .f_a(f_a), .f_b(f_b), .out(out));

  always begin @(out); t_out = $realtime; end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_a = 0; in_b = 0; f_sel = 0; f_a = '1; f_b = '0;
    #1000;
    for (int c = 0; c < 32; c++) begin
      f_sel = (c >= 16);
      f_b   = 16'((32'hFFFF << (16 - c % 16)));
      f_a   = ~f_b;
      for (int e = 0; e < 2; e++) begin
        real d, want;
        #500;
        in_a = ~in_a;
        t_a  = $realtime;
        #(T);
        in_b = in_a;
        #400;
        d    = t_out - t_a;
        want = T + real'(c) * T / 32.0;
        checks++;
        if (out !== in_a || d < want - 0.005 || d > want + 0.005) begin
          failures++;
          $display("FAIL code %0d delay %0.3f expected %0.3f", c, d, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
