`timescale 1ps/1fs
// sppd: behavioural model of the sample-based phase detector (SPPD).
//
// Behavioural model, not synthesizable. Two registers sample CLK_DLY with
// CLK_INT through one and through two buffers; through their setup and hold
// times the two effective sampling instants straddle the CLK_INT edge by a
// window of T_WIN (about 60 ps in 90-nm CMOS). With Q0 the early and Q1 the
// late sample:
//   up1 = ~(Q0 | Q1)   CLK_DLY rises after the window  -> more delay
//   dn1 =   Q0 & Q1    CLK_DLY rises before the window -> less delay
// and both are 0 when the CLK_DLY edge falls inside the window, so jitter
// smaller than the window produces no correction. The model takes Q0 as the
// level of CLK_DLY T_WIN/2 before the CLK_INT edge and Q1 as the level
// T_WIN/2 after it; both registers update T_WIN/2 after the CLK_INT edge,
// when Q0 is found from the present level and the time of the last CLK_DLY
// edge (valid while edges are more than T_WIN apart). It is the detector
// used after lock.
//
// The NOR/AND output logic and the window follow the SPPD design; placing
// the window symmetrically around the CLK_INT edge is this model's choice.
module sppd
  import dll_pkg::*;
#(
  parameter real T_WIN = 60.0   // ps, width of the dead window
) (
  input  logic clk_int,
  input  logic clk_dly,
  output logic up1,
  output logic dn1
);
  logic q0, q1;
  real  t_dly;    // time of the last CLK_DLY edge

  initial begin
    q0    = 1'b0;
    q1    = 1'b1;
    t_dly = -1.0e9;
  end

  always begin
    @(clk_dly);
    t_dly = $realtime;
  end

  always begin
    @(posedge clk_int);
    begin
      automatic real t0 = $realtime;
      vdelay(ps_to_fs(T_WIN / 2.0));
      // at most one CLK_DLY edge lies inside the window, so the level before
      // the window is the present level, inverted if that edge happened
      // after t0 - T_WIN/2
      q0 = (t_dly > t0 - T_WIN / 2.0) ? ~clk_dly : clk_dly;
      q1 = clk_dly;
    end
  end

  assign up1 = ~(q0 | q1);
  assign dn1 = q0 & q1;
endmodule
