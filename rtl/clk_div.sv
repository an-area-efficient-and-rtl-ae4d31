`timescale 1ps/1fs
// clk_div: divider that makes the DLL controller clock from the reference
// clock.
//
// The controller runs at 1/DIV of the reference clock (DIV = 8: at most
// 200 MHz for a 1.6 GHz reference). A counter toggles clk_out every DIV/2
// rising edges of clk_in, giving a 50 % duty cycle for even DIV (odd DIV
// rounds the half period down). clk_out is a register output and is low
// during reset; its first rising edge comes DIV/2 input edges after reset is
// released.
//
// The ratio 1/8 is the DLL's; the counter implementation is this design's.
module clk_div #(
  parameter int unsigned DIV = 8
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  localparam int unsigned HALF = (DIV / 2 < 1) ? 1 : DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt <= cnt + CW'(1);
    end
  end
endmodule
