`timescale 1ps/1fs
// tb_therm_decoder: exhaustive check of the binary-to-thermometer decoder at
// its default width (7 -> 128 bits). The expected word is (1 << v) - 1.
module tb_therm_decoder;
  localparam int unsigned IN_W = 7;
  logic [IN_W-1:0]    bin;
  logic [2**IN_W-1:0] therm, expv;
  int checks = 0, failures = 0;

  therm_decoder #(.IN_W(IN_W)) dut (.bin(bin), .therm(therm));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**IN_W; v++) begin
      bin = IN_W'(v);
      #1;
      expv = ((2**IN_W)'(1) << v) - 1;
      checks++;
      if (therm !== expv) begin
        failures++;
        $display("FAIL bin=%0d therm=%h expected=%h", v, therm, expv);
      end
      checks++;
      if ($countones(therm) != v) begin
        failures++;
        $display("FAIL bin=%0d has %0d ones", v, $countones(therm));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
