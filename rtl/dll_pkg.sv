`timescale 1ps/1fs
// dll_pkg: types, constants and the variable-delay helper shared by the DLL,
// its phase detector and the digitally controlled phase shifters (DCPS).
//
// The DCPS code is split as the architecture prescribes: the upper k-5 bits
// select a number of coarse delay units (CDUs), the lower 5 bits select one of
// 32 interpolated phases between two adjacent CDU taps. The fine delay unit
// (FDU) is partitioned into two halves of 16 tri-state drivers per path.
//
// vdelay() is used only by the behavioural delay models. It waits a number of
// femtoseconds given at run time by chaining fixed, binary-weighted waits, so
// that every delay in the models is a constant (a run-time "#(expr)" is not
// accepted by every simulator). Range: 0 to 2^25-1 fs (about 33.5 ns).
package dll_pkg;

  localparam int unsigned FINE_BITS = 5;               // CODE[4:0]
  localparam int unsigned FINE_STEPS = 1 << FINE_BITS; // 32 phases per CDU
  localparam int unsigned N_DRV = FINE_STEPS / 2;      // 16 drivers per path

  // Decision of the phase detector, as seen by the DLL controller.
  typedef enum logic [1:0] {
    PD_NONE = 2'b00,
    PD_UP   = 2'b01,   // CLK_DLY late: the detector asks for more delay
    PD_DN   = 2'b10    // CLK_DLY early: the detector asks for less delay
  } pd_dir_e;

  // States of the control procedure (acquisition, convergence, locked).
  typedef enum logic [2:0] {
    ST_INIT     = 3'd0,  // first increase of the code after reset
    ST_SRCH_UP  = 3'd1,  // phase 0..180 deg: PD says UP, keep increasing
    ST_SRCH_DN  = 3'd2,  // phase 180..360 deg: PD says DN, keep increasing
    ST_CONVERGE = 3'd3,  // step halving, code moved against the PD
    ST_LOCKED   = 3'd4   // step 1, code moved against the PD
  } ctrl_state_e;

  localparam int unsigned VDELAY_BITS = 25;

  task automatic vdelay(input logic [VDELAY_BITS-1:0] fs);
    if (fs[0])  #0.001;
    if (fs[1])  #0.002;
    if (fs[2])  #0.004;
    if (fs[3])  #0.008;
    if (fs[4])  #0.016;
    if (fs[5])  #0.032;
    if (fs[6])  #0.064;
    if (fs[7])  #0.128;
    if (fs[8])  #0.256;
    if (fs[9])  #0.512;
    if (fs[10]) #1.024;
    if (fs[11]) #2.048;
    if (fs[12]) #4.096;
    if (fs[13]) #8.192;
    if (fs[14]) #16.384;
    if (fs[15]) #32.768;
    if (fs[16]) #65.536;
    if (fs[17]) #131.072;
    if (fs[18]) #262.144;
    if (fs[19]) #524.288;
    if (fs[20]) #1048.576;
    if (fs[21]) #2097.152;
    if (fs[22]) #4194.304;
    if (fs[23]) #8388.608;
    if (fs[24]) #16777.216;
  endtask

  // Picoseconds (real) to the femtosecond count used by vdelay(), clamped.
  function automatic logic [VDELAY_BITS-1:0] ps_to_fs(input real ps);
    real fs;
    fs = ps * 1000.0;
    if (fs <= 0.0) return '0;
    if (fs >= real'((1 << VDELAY_BITS) - 1)) return '1;
    return VDELAY_BITS'($rtoi(fs + 0.5));
  endfunction

endpackage
