`timescale 1ps/1fs
// dcps: k-bit digitally controlled phase shifter (DCPS).
//
// The DCPS is the delay element of the whole design: as DCPS-360 it is the
// DLL's delay line that the loop locks to one reference period, and as
// DCPS-90 it is the per-pin phase shifter. The code splits into
//   code[K-1:5] : number of coarse delay units, decoded to a thermometer word
//                 for a line of 2^(K-5) CDUs (output tap IN_a);
//   code[4:0]   : one of 32 phases between IN_a and IN_b = IN_a + one CDU,
//                 decoded into f_sel / f_a / f_b for the interpolator.
// A third CDU after IN_b is a dummy load. The delay from in to out is
//   (2 + code/32) * T_CDU
// i.e. linear in the code with a step of T_CDU/32 and the same intrinsic
// delay as the DCPS-0 replica. Code changes take effect for edges that enter
// after the change.
//
// Behavioural model: the two decoders are synthesizable logic, the delay
// elements (cdu_line, cdu, fdu) are behavioural models of analog circuits.
// The structure follows the DCPS architecture; K = 12 is the DCPS-360 and
// K = 10 the DCPS-90. The dummy CDU's output is intentionally unused.
module dcps
  import dll_pkg::*;
#(
  parameter int unsigned K     = 12,
  parameter real         T_CDU = 67.0   // ps
) (
  input  logic         in,
  input  logic [K-1:0] code,
  output logic         out
);
  localparam int unsigned NC = 2 ** (K - FINE_BITS);

  logic [NC-1:0]    c_therm;
  logic             in_a, in_b, dummy_out;
  logic             f_sel;
  logic [N_DRV-1:0] f_a, f_b;

  therm_decoder #(.IN_W(K - FINE_BITS)) u_therm (
    .bin  (code[K-1:FINE_BITS]),
    .therm(c_therm)
  );

  cdu_line #(.N(NC), .T_CDU(T_CDU)) u_line (
    .in     (in),
    .c_therm(c_therm),
    .out    (in_a)
  );

  cdu #(.T_CDU(T_CDU)) u_cdu_b     (.in(in_a), .out(in_b));
  cdu #(.T_CDU(T_CDU)) u_cdu_dummy (.in(in_b), .out(dummy_out));

  fdu_decoder u_fdec (
    .code (code[FINE_BITS-1:0]),
    .f_sel(f_sel),
    .f_a  (f_a),
    .f_b  (f_b)
  );

  fdu #(.T_CDU(T_CDU)) u_fdu (
    .in_a (in_a),
    .in_b (in_b),
    .f_sel(f_sel),
    .f_a  (f_a),
    .f_b  (f_b),
    .out  (out)
  );
endmodule
