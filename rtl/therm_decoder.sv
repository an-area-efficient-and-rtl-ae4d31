`timescale 1ps/1fs
// therm_decoder: binary-to-thermometer decoder of the DCPS coarse code.
//
// The upper k-5 bits of a k-bit DCPS code tell how many coarse delay units
// the edge passes through. This decoder turns that binary number into the
// enable word of the coarse delay line: therm[i] = 1 for every i < bin, so a
// larger code enables a longer run of stages starting at stage 0. With
// IN_W = 7 (a 12-bit DCPS-360) the word is 128 bits wide, one bit per CDU of
// the line; the top bit is never set, because the line's first stage always
// passes the edge. Purely combinational.
//
// The decoder's place and its input/output are the DCPS architecture's; the
// bit ordering (stage 0 first) is this design's choice.
module therm_decoder #(
  parameter int unsigned IN_W = 7
) (
  input  logic [IN_W-1:0]      bin,
  output logic [2**IN_W-1:0]   therm
);
  always_comb begin
    for (int unsigned i = 0; i < 2**IN_W; i++)
      therm[i] = (i < 32'(bin));
  end
endmodule
