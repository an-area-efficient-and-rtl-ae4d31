`timescale 1ps/1fs
// phase_detector: the DLL's phase detector (PD).
//
// Two parts. Detection window range selection: the SAPD (no dead zone, fine
// resolution) and the SPPD (about 60 ps dead window) both compare CLK_DLY
// with CLK_INT on every rising CLK_INT edge; two multiplexers controlled by
// LOCK pass the SAPD's UP0/DN0 before lock and the SPPD's UP1/DN1 after
// lock as the windowed signals UPW/DNW. Configurable consecutive phase
// decision: consec_decision samples UPW/DNW on the controller clock and
// issues UP/DN only after NUM0 (before lock) or NUM1 (after lock) net votes.
//
// Interface: clk_int/clk_dly are the compared clocks; clk/rst_n, lock,
// hold, num0/num1 and the up/dn pulses belong to the controller clock
// domain. UPW/DNW are held for a whole reference cycle and change a fixed
// delay after CLK_INT, which is the reference clock delayed by the DCPS-0,
// so the controller clock, derived from the same reference, samples them
// away from their changes.
//
// Behavioural model (the two detectors are); the structure follows the PD
// architecture, the hold input is this design's.
module phase_detector #(
  parameter int unsigned NUM_W = 4
) (
  input  logic             clk_int,
  input  logic             clk_dly,
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lock,
  input  logic             hold,
  input  logic [NUM_W-1:0] num0,
  input  logic [NUM_W-1:0] num1,
  output logic             up,
  output logic             dn
);
  logic up0, dn0, up1, dn1, upw, dnw;

  sapd u_sapd (.clk_int(clk_int), .clk_dly(clk_dly), .up0(up0), .dn0(dn0));
  sppd u_sppd (.clk_int(clk_int), .clk_dly(clk_dly), .up1(up1), .dn1(dn1));

  // detection window range selection
  always_comb begin
    upw = lock ? up1 : up0;
    dnw = lock ? dn1 : dn0;
  end

  consec_decision #(.NUM_W(NUM_W)) u_decision (
    .clk  (clk),
    .rst_n(rst_n),
    .upw  (upw),
    .dnw  (dnw),
    .lock (lock),
    .hold (hold),
    .num0 (num0),
    .num1 (num1),
    .up   (up),
    .dn   (dn)
  );
endmodule
