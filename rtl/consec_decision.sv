`timescale 1ps/1fs
// consec_decision: configurable consecutive phase decision of the phase
// detector (JUDGE, ACCU and COMP).
//
// Runs on the DLL controller clock. Each cycle JUDGE turns the windowed
// detector outputs into a step for the accumulator: +1 for UPW, -1 for DNW,
// 0 when neither (or both) is set. ACCU adds the step; COMP compares the sum
// with NUM, which is NUM0 before lock and NUM1 after lock (selected by
// LOCK). When the sum reaches +NUM the block issues a one-cycle UP pulse,
// when it reaches -NUM a one-cycle DN pulse, and the accumulator restarts
// from 0. Back-and-forth decisions caused by zero-mean jitter cancel in the
// accumulator and never reach the delay code. NUM = 0 acts as 1.
//
// hold = 1 marks a cycle in which the controller changes the delay code; the
// sample of that cycle was taken with the old code, so it is dropped and the
// accumulator is cleared (this also covers the switch of LOCK, which
// coincides with a code change).
// Timing: the sample at clock edge n produces UP/DN in the cycle after edge n.
//
// JUDGE/ACCU/COMP and the NUM0/NUM1 selection by LOCK follow the phase
// detector design; the hold input, the clearing after each decision and the
// widths are this design's choices.
module consec_decision #(
  parameter int unsigned NUM_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upw,
  input  logic             dnw,
  input  logic             lock,
  input  logic             hold,
  input  logic [NUM_W-1:0] num0,
  input  logic [NUM_W-1:0] num1,
  output logic             up,
  output logic             dn
);
  localparam int unsigned AW = NUM_W + 2;

  logic signed [AW-1:0] acc, step, acc_n, num_eff;
  logic [NUM_W-1:0]     num;
  logic                 hit_up, hit_dn;

  always_comb begin
    // JUDGE
    if (upw && !dnw)      step = AW'(1);
    else if (dnw && !upw) step = -AW'(1);
    else                  step = '0;
    // ACCU and COMP
    num     = lock ? num1 : num0;
    num_eff = (num == '0) ? AW'(1) : AW'(num);
    acc_n   = acc + step;
    hit_up  = acc_n >= num_eff;
    hit_dn  = acc_n <= -num_eff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      up  <= 1'b0;
      dn  <= 1'b0;
    end else begin
      up <= 1'b0;
      dn <= 1'b0;
      if (hold) begin
        acc <= '0;
      end else if (hit_up) begin
        up  <= 1'b1;
        acc <= '0;
      end else if (hit_dn) begin
        dn  <= 1'b1;
        acc <= '0;
      end else begin
        acc <= acc_n;
      end
    end
  end

  // UP and DN are never issued together
  a_exclusive : assert property (@(posedge clk) disable iff (!rst_n) !(up && dn));
endmodule
