`timescale 1ps/1fs
// cdu_line: behavioural model of the ladder-shaped NAND coarse delay line.
//
// Behavioural model, not synthesizable. The line has N stages of one CDU
// each (N = 2^(k-5), 128 in a 12-bit DCPS). The thermometer word c_therm
// from the binary-to-thermometer decoder enables stages from stage 0 up; an
// edge passes the always-active first stage plus one stage per enabled bit,
// so the delay from in to out is (1 + m) * T_CDU where m is the number of
// consecutive ones in c_therm starting at bit 0 (a "bubble" ends the run, as
// the edge turns back at the first disabled rung of a ladder).
// The delay is taken when an edge enters the line (transport delay), so a
// code change affects edges that enter after it.
//
// The CDU step of two NAND delays and the line length follow the DCPS
// architecture; the gate-level ladder is not modelled, only its delay.
module cdu_line
  import dll_pkg::*;
#(
  parameter int unsigned N     = 128,
  parameter real         T_CDU = 67.0   // ps
) (
  input  logic         in,
  input  logic [N-1:0] c_therm,
  output logic         out
);
  initial out = 1'b0;

  function automatic int unsigned run_length(input logic [N-1:0] c);
    int unsigned m = 0;
    for (int unsigned i = 0; i < N - 1; i++) begin
      if (!c[i]) break;
      m++;
    end
    return m;
  endfunction

  always begin
    @(in);
    fork
      begin
        automatic logic v = in;
        automatic int unsigned m = run_length(c_therm);
        vdelay(ps_to_fs(T_CDU * real'(m + 1)));
        out = v;
      end
    join_none
  end
endmodule
