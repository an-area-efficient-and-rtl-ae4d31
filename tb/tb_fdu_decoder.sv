`timescale 1ps/1fs
// tb_fdu_decoder: exhaustive check of the fine-code decoder: f_sel is the
// half, n = code[3:0] path-b drivers are on, f_a = ~f_b, and the end codes
// of each half are 11..11/00..00 and 00..01/11..10.
module tb_fdu_decoder;
  logic [4:0]  code;
  logic        f_sel;
  logic [15:0] f_a, f_b, exp_b;
  int checks = 0, failures = 0;

  fdu_decoder dut (.code(code), .f_sel(f_sel), .f_a(f_a), .f_b(f_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL code=%0d %s (f_sel=%b f_a=%b f_b=%b)", code, what, f_sel, f_a, f_b);
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
    for (int c = 0; c < 32; c++) begin
      code = 5'(c);
      #1;
      exp_b = ~(16'hFFFF >> (c % 16));   // top (c % 16) bits set
      check(f_sel == (c >= 16), "f_sel");
      check(f_b == exp_b, "f_b pattern");
      check(f_a == ~f_b, "f_a complement");
      check($countones(f_b) == c % 16, "driver count");
      if (c % 16 == 0)  check(f_a == 16'hFFFF && f_b == 16'h0000, "first code of half");
      if (c % 16 == 15) check(f_a == 16'h0001 && f_b == 16'hFFFE, "last code of half");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
