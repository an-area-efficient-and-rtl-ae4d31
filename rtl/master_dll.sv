`timescale 1ps/1fs
// master_dll: the master digital DLL that tracks the reference clock period.
//
// CLK_REF feeds two delay lines. The DCPS-360 (K-bit DCPS) produces CLK_DLY;
// the DCPS-0 replica produces CLK_INT with the DCPS-360's intrinsic delay.
// The phase detector compares CLK_DLY with CLK_INT and the controller moves
// CODE_DCPS-360 until the code-controlled delay equals one reference
// period. The locked code is the timing information for the phase shifters:
// a DCPS of the same CDU step driven with a fraction of this code delays by
// the same fraction of a period.
//
// The controller, the consecutive decision logic and the phase shift
// controller run on clk_ctrl = CLK_REF / DIV.
// Interface: clk_ref, rst_n (asynchronous, active low), num0/num1 (NUM0,
// NUM1 of the phase detector); outputs clk_dly, clk_ctrl, code, lock and
// the controller state.
// Lock time from reset, in controller cycles, is roughly
// 2 * (T_ref / T_CDU) for the search plus 2 * log2(S_INIT) for convergence,
// each multiplied by about (NUM0 + 1).
//
// Behavioural model (its delay lines and detectors are); the structure
// follows the DLL architecture.
module master_dll
  import dll_pkg::*;
#(
  parameter int unsigned K      = 12,
  parameter int unsigned S_INIT = 32,
  parameter int unsigned DIV    = 8,
  parameter int unsigned NUM_W  = 4,
  parameter real         T_CDU  = 67.0   // ps
) (
  input  logic             clk_ref,
  input  logic             rst_n,
  input  logic [NUM_W-1:0] num0,
  input  logic [NUM_W-1:0] num1,
  output logic             clk_dly,
  output logic             clk_ctrl,
  output logic [K-1:0]     code,
  output logic             lock,
  output ctrl_state_e      state
);
  logic clk_int, up, dn, upd;

  clk_div #(.DIV(DIV)) u_div (.clk_in(clk_ref), .rst_n(rst_n), .clk_out(clk_ctrl));

  dcps #(.K(K), .T_CDU(T_CDU)) u_dcps360 (.in(clk_ref), .code(code), .out(clk_dly));

  dcps0 #(.T_CDU(T_CDU)) u_dcps0 (.in(clk_ref), .out(clk_int));

  phase_detector #(.NUM_W(NUM_W)) u_pd (
    .clk_int(clk_int),
    .clk_dly(clk_dly),
    .clk    (clk_ctrl),
    .rst_n  (rst_n),
    .lock   (lock),
    .hold   (upd),
    .num0   (num0),
    .num1   (num1),
    .up     (up),
    .dn     (dn)
  );

  dll_ctrl #(.K(K), .S_INIT(S_INIT)) u_ctrl (
    .clk  (clk_ctrl),
    .rst_n(rst_n),
    .up   (up),
    .dn   (dn),
    .code (code),
    .lock (lock),
    .upd  (upd),
    .state(state)
  );
endmodule
