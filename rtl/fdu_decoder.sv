`timescale 1ps/1fs
// fdu_decoder: fine-code decoder for the partitioned interpolator (FDU).
//
// The 5-bit fine code selects one of 32 phases between two adjacent coarse
// taps. The interpolator splits that interval in two halves with a buffer of
// half a CDU, so:
//   f_sel = code[4]      picks the half (0: IN_a..IN_a+, 1: IN_a+..IN_b)
//   code[3:0] = n        gives the weight of the later input: n of the 16
//                        path-b drivers are on and the other 16-n path-a
//                        drivers are on (f_a = ~f_b, always 16 drivers on).
// n = 0 gives f_a = 11..11, f_b = 00..00 (output follows the earlier input);
// n = 15 gives f_a = 00..01, f_b = 11..10. Path-a drivers are switched off
// from the top bit down, path-b drivers switched on from the top bit down.
// Combinational.
//
// The code split, the 16+16 drivers and the end codes follow the FDU
// architecture; the order in which individual drivers are switched is this
// design's choice.
module fdu_decoder
  import dll_pkg::*;
(
  input  logic [FINE_BITS-1:0] code,
  output logic                 f_sel,
  output logic [N_DRV-1:0]     f_a,
  output logic [N_DRV-1:0]     f_b
);
  logic [FINE_BITS-2:0] n;

  always_comb begin
    f_sel = code[FINE_BITS-1];
    n     = code[FINE_BITS-2:0];
    // f_a keeps its lowest N_DRV-n drivers on
    for (int unsigned i = 0; i < N_DRV; i++)
      f_a[i] = (i < (N_DRV - 32'(n)));
    f_b = ~f_a;
  end
endmodule
