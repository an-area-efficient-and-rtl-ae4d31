`timescale 1ps/1fs
// tb_clk_div: the divided clock follows an independent model, edge by edge.
// After reset is released, input rising edge n (counting from 1) leaves the
// output at ((n / (DIV/2)) mod 2): it stays low for DIV/2 - 1 edges, rises on
// edge DIV/2 and toggles every DIV/2 edges after that. The test checks this
// at every input edge for 400 edges, for DIV = 8 (the default) and DIV = 4,
// and also checks that the output is low during reset, that a reset in the
// middle of a high phase brings it low at once, and the count of divided
// edges and high cycles (one rising edge per DIV inputs, 50 % duty).
module tb_clk_div;
  logic clk, rst_n, clk8, clk4;
  int checks = 0, failures = 0;
  int n_out, hi;
  logic prev;

  clk_div dut8 (.clk_in(clk), .rst_n(rst_n), .clk_out(clk8));
  clk_div #(.DIV(4)) dut4 (.clk_in(clk), .rst_n(rst_n), .clk_out(clk4));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0;
    forever #312.5 clk = ~clk;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int edges);
    n_out = 0; hi = 0; prev = clk8;
    for (int n = 1; n <= edges; n++) begin
      @(posedge clk);
      #1;
      chk(clk8 == 1'(((n / 4) % 2)), $sformatf("DIV 8: edge %0d out %0b", n, clk8));
      chk(clk4 == 1'(((n / 2) % 2)), $sformatf("DIV 4: edge %0d out %0b", n, clk4));
      if (clk8 && !prev) n_out++;
      if (clk8) hi++;
      prev = clk8;
    end
  endtask

  initial begin
    rst_n = 0;
    repeat (5) @(posedge clk);
    chk(clk8 == 1'b0 && clk4 == 1'b0, "outputs high in reset");
    @(negedge clk) rst_n = 1;
    run(400);
    chk(n_out == 50, $sformatf("%0d divided edges in 400 cycles", n_out));
    chk(hi == 200, $sformatf("high for %0d of 400 cycles", hi));
    // reset while the divided clock is high
    repeat (5) @(posedge clk);
    #1;
    chk(clk8 == 1'b1, "divided clock high before the second reset");
    @(negedge clk) rst_n = 0;
    #1;
    chk(clk8 == 1'b0 && clk4 == 1'b0, "reset does not clear the outputs at once");
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
