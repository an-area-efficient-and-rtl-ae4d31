`timescale 1ps/1fs
// dcps0: DCPS-0, the intrinsic-delay replica of the DLL.
//
// The DLL compares the DCPS-360 output with the reference clock passed
// through this replica, so that the DCPS-360's own minimum delay (its
// first CDU, the IN_b CDU and the interpolator) cancels and the loop locks
// the code-controlled part of the delay to exactly one period. It is the
// DCPS at code 0 without decoders: two CDUs in series give IN_a and IN_b, a
// third CDU is the dummy load, and the FDU has the fixed setting
// f_sel = 0, f_a = all ones, f_b = all zeros. Delay in -> out: 2 * T_CDU.
//
// Behavioural model (its delay elements are); the structure follows the
// DCPS-0 architecture. The dummy CDU's output is intentionally unused.
module dcps0
  import dll_pkg::*;
#(
  parameter real T_CDU = 67.0   // ps
) (
  input  logic in,
  output logic out
);
  logic in_a, in_b, dummy_out;

  cdu #(.T_CDU(T_CDU)) u_cdu_a     (.in(in),   .out(in_a));
  cdu #(.T_CDU(T_CDU)) u_cdu_b     (.in(in_a), .out(in_b));
  cdu #(.T_CDU(T_CDU)) u_cdu_dummy (.in(in_b), .out(dummy_out));

  fdu #(.T_CDU(T_CDU)) u_fdu (
    .in_a (in_a),
    .in_b (in_b),
    .f_sel(1'b0),
    .f_a  ({N_DRV{1'b1}}),
    .f_b  ({N_DRV{1'b0}}),
    .out  (out)
  );
endmodule
