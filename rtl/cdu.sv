`timescale 1ps/1fs
// cdu: behavioural model of one coarse delay unit (CDU).
//
// Behavioural model, not synthesizable: a CDU is a stage of a NAND-gate
// delay line, so its only property here is its delay. One CDU step is two
// NAND propagation delays; the default 67.0 ps is the typical-corner CDU step
// of the 90-nm implementation (42.2 ps best, 113.5 ps worst corner).
//
// Interface: in -> out, every edge of in reappears on out T_CDU later
// (transport delay: pulses shorter than T_CDU are kept, not swallowed).
// In the DCPS it follows the coarse line to make the second interpolator
// input IN_b, and a further CDU is a dummy load that keeps IN_b's loading
// equal to IN_a's; the DCPS-0 is built from three of them.
module cdu
  import dll_pkg::*;
#(
  parameter real T_CDU = 67.0   // ps
) (
  input  logic in,
  output logic out
);
  initial out = 1'b0;

  always begin
    @(in);
    fork
      begin
        automatic logic v = in;
        vdelay(ps_to_fs(T_CDU));
        out = v;
      end
    join_none
  end
endmodule
