`timescale 1ps/1fs
// sapd: behavioural model of the sense-amplifier-based phase detector.
//
// Behavioural model, not synthesizable. The sense amplifier is precharged
// while CLK_INT is low and resolves on the rising edge of CLK_INT, comparing
// CLK_DLY against CLK_INT with a negligible dead zone. Because its outputs
// are only valid while CLK_INT is high, a pulse generator (CLK_PUL) loads
// them into two registers that hold the decision for a full cycle.
//   clk_dly low  at the CLK_INT edge (CLK_DLY late)  -> up0 = 1, dn0 = 0
//   clk_dly high at the CLK_INT edge (CLK_DLY early) -> up0 = 0, dn0 = 1
// Timing: up0/dn0 change T_PUL after each rising edge of clk_int and hold
// until the next one. It is the detector used before lock.
//
// Resolve-on-CLK_INT, precharge-when-low and the pulse-loaded output
// registers follow the SAPD design; T_PUL and the polarity naming (UP asks
// for more delay) are this model's.
module sapd
  import dll_pkg::*;
#(
  parameter real T_PUL = 20.0   // ps, CLK_INT edge to register update
) (
  input  logic clk_int,
  input  logic clk_dly,
  output logic up0,
  output logic dn0
);
  logic sa;   // resolved sense-amplifier state: 1 = CLK_DLY already high

  initial begin
    up0 = 1'b0;
    dn0 = 1'b0;
    sa  = 1'b0;
  end

  always begin
    @(posedge clk_int);
    sa = clk_dly;
    vdelay(ps_to_fs(T_PUL));
    up0 = ~sa;
    dn0 = sa;
  end
endmodule
