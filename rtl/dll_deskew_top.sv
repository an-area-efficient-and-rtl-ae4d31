`timescale 1ps/1fs
// dll_deskew_top: master DLL with distributed per-pin phase shifters.
//
// A master DLL locks its K_MASTER-bit DCPS-360 to one period of CLK_REF and
// exports the locked code. A phase shift controller turns that code into a
// K_SLAVE-bit code per pin (one quarter of the master code, plus a per-pin
// trim), and each of the N_CH phase shifters, a DCPS-90, delays its pin
// signal d_int[i] by that code to give d_ext[i]. Because master and slaves
// use the same delay units, a slave's delay is the programmed fraction of
// the reference period over process, voltage and temperature; the default
// is 90 degrees plus trim, for strobe centring and per-pin deskew of a DDR
// interface.
//
// Interface: clk_ref, rst_n (asynchronous, active low); num0/num1 set the
// consecutive-decision counts of the phase detector before/after lock;
// trim[i] is pin i's signed deskew trim in fine steps; d_int/d_ext are the
// pin signals before/after their phase shifter (one direction per pin).
// Outputs clk_dly (the DLL's delayed clock), code360, code90[], lock and
// the DLL controller's state.
// Timing: codes change on the controller clock (CLK_REF / DIV); a pin's
// delay is 2 * T_CDU + code90 * T_CDU / 32.
//
// The pads, the link controller that drives trim and d_int, and the
// bidirectional pin multiplexing are outside this module. Behavioural model
// (its delay lines and detectors are).
module dll_deskew_top
  import dll_pkg::*;
#(
  parameter int unsigned N_CH     = 2,
  parameter int unsigned K_MASTER = 12,
  parameter int unsigned K_SLAVE  = 10,
  parameter int unsigned NUM_W    = 4,
  parameter int unsigned TRIM_W   = 6,
  parameter int unsigned S_INIT   = 32,
  parameter int unsigned DIV      = 8,
  parameter real         T_CDU    = 67.0   // ps
) (
  input  logic                     clk_ref,
  input  logic                     rst_n,
  input  logic [NUM_W-1:0]         num0,
  input  logic [NUM_W-1:0]         num1,
  input  logic signed [TRIM_W-1:0] trim   [N_CH],
  input  logic [N_CH-1:0]          d_int,
  output logic [N_CH-1:0]          d_ext,
  output logic                     clk_dly,
  output logic [K_MASTER-1:0]      code360,
  output logic [K_SLAVE-1:0]       code90 [N_CH],
  output logic                     lock,
  output ctrl_state_e              dll_state
);
  logic clk_ctrl;

  master_dll #(
    .K(K_MASTER), .S_INIT(S_INIT), .DIV(DIV), .NUM_W(NUM_W), .T_CDU(T_CDU)
  ) u_dll (
    .clk_ref (clk_ref),
    .rst_n   (rst_n),
    .num0    (num0),
    .num1    (num1),
    .clk_dly (clk_dly),
    .clk_ctrl(clk_ctrl),
    .code    (code360),
    .lock    (lock),
    .state   (dll_state)
  );

  phase_shift_ctrl #(
    .N_CH(N_CH), .K_MASTER(K_MASTER), .K_SLAVE(K_SLAVE), .SHIFT(2), .TRIM_W(TRIM_W)
  ) u_psc (
    .clk    (clk_ctrl),
    .rst_n  (rst_n),
    .code360(code360),
    .trim   (trim),
    .code90 (code90)
  );

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    dcps #(.K(K_SLAVE), .T_CDU(T_CDU)) u_dcps90 (
      .in  (d_int[i]),
      .code(code90[i]),
      .out (d_ext[i])
    );
  end
endmodule
