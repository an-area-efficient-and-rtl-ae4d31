`timescale 1ps/1fs
// fdu: behavioural model of the partitioned complementary-driving
// interpolator, the fine delay unit (FDU) of the DCPS.
//
// Behavioural model, not synthesizable. IN_a and IN_b are two taps one CDU
// apart. An extra buffer makes IN_a+ = IN_a delayed by half a CDU (T_SUB),
// and two multiplexers controlled by f_sel pick the pair that drives the two
// 16-driver tri-state banks:
//   f_sel = 0 : path a <- IN_a,  path b <- IN_a+
//   f_sel = 1 : path a <- IN_a+, path b <- IN_b
// The common node is modelled as an ideal interpolator: its edge lies at the
// fraction w = nb / (na + nb) of the way from the path-a edge to the path-b
// edge, na and nb being the numbers of enabled drivers (ones in f_a, f_b),
// and the output buffer adds T_OUT. With the decoder's codes (16 drivers
// always on) the 32 fine codes give 32 equal steps of T_CDU/32 from IN_a.
// The model takes the time of each path-a edge and, at the matching path-b
// edge, schedules the output edge; T_OUT must therefore be at least T_SUB.
// Non-uniform steps of a real interpolator are not modelled.
//
// The structure (buffer, two muxes, 16+16 drivers, f_sel halves) follows
// the FDU architecture; the delay values T_SUB and T_OUT are this model's.
module fdu
  import dll_pkg::*;
#(
  parameter real T_CDU = 67.0,        // ps, phase step between IN_a and IN_b
  parameter real T_SUB = T_CDU / 2.0, // ps, the partitioning buffer
  parameter real T_OUT = T_CDU        // ps, output buffer, >= T_SUB
) (
  input  logic             in_a,
  input  logic             in_b,
  input  logic             f_sel,
  input  logic [N_DRV-1:0] f_a,
  input  logic [N_DRV-1:0] f_b,
  output logic             out
);
  logic in_ap;      // IN_a+ : IN_a through the partitioning buffer
  logic pa, pb;     // the pair selected by f_sel
  real  t_pa;       // time of the last path-a edge

  initial begin
    out   = 1'b0;
    in_ap = 1'b0;
    t_pa  = 0.0;
  end

  always begin
    @(in_a);
    fork
      begin
        automatic logic v = in_a;
        vdelay(ps_to_fs(T_SUB));
        in_ap = v;
      end
    join_none
  end

  assign pa = f_sel ? in_ap : in_a;
  assign pb = f_sel ? in_b  : in_ap;

  always begin
    @(pa);
    t_pa = $realtime;
  end

  always begin
    @(pb);
    fork
      begin
        automatic logic v  = pb;
        automatic int   na = $countones(f_a);
        automatic int   nb = $countones(f_b);
        automatic real  w  = (na + nb == 0) ? 0.0 : real'(nb) / real'(na + nb);
        automatic real  dt = $realtime - t_pa;
        vdelay(ps_to_fs(T_OUT - (1.0 - w) * dt));
        out = v;
      end
    join_none
  end
endmodule
