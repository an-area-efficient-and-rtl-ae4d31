`timescale 1ps/1fs
// dll_ctrl: control procedure of the digital DLL (CTRL).
//
// Drives CODE_DCPS-360 from the phase detector's UP/DN decisions, running
// on the divided controller clock. The procedure:
//   reset       code = 0 (minimum delay), step = S_INIT (one CDU);
//   ST_INIT     one unconditional increase of the code;
//   ST_SRCH_UP  phase 0..180 deg: while UP, increase by step; on DN go on;
//   ST_SRCH_DN  phase 180..360 deg: while DN, increase by step; on UP the
//               delay has just passed one period: this is the first
//               direction change, so halve the step, enter ST_CONVERGE and
//               move the code against the detector (UP -> decrease);
//   ST_CONVERGE every decision moves the code by step against the detector
//               (UP -> code - step, DN -> code + step). When the direction
//               differs from the previous one the step is halved first; if
//               the step is already 1 the loop is locked;
//   ST_LOCKED   LOCK = 1; every decision moves the code by 1 against the
//               detector.
// Starting from the minimum delay and passing through UP then DN means the
// loop can only settle at one period, never at a multiple of it. The lock
// point is where the detector turns from DN to UP as the code rises, which
// is why the code moves against the detector there.
// The code saturates at 0 and 2^K-1.
//
// Interface: up/dn are one-cycle decision pulses (never both). upd is high
// in a cycle whose clock edge changes the code (combinational), so that the
// detector can drop the sample taken with the old code. code, lock and
// state are registered.
//
// The procedure follows the DLL's control flow; the INIT state and the
// saturation are this design's additions.
module dll_ctrl
  import dll_pkg::*;
#(
  parameter int unsigned K      = 12,
  parameter int unsigned S_INIT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        up,
  input  logic        dn,
  output logic [K-1:0] code,
  output logic        lock,
  output logic        upd,
  output ctrl_state_e state
);
  localparam int unsigned CODE_MAX = (1 << K) - 1;

  ctrl_state_e      state_n;
  logic [K-1:0]     step, step_n, code_n;
  pd_dir_e          dir_last, dir_last_n, dir;
  logic             move, toward_more;

  function automatic logic [K-1:0] add_sat(input logic [K-1:0] a, input logic [K-1:0] b);
    logic [K:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s > (K+1)'(CODE_MAX)) ? K'(CODE_MAX) : s[K-1:0];
  endfunction

  function automatic logic [K-1:0] sub_sat(input logic [K-1:0] a, input logic [K-1:0] b);
    return (a < b) ? '0 : a - b;
  endfunction

  always_comb begin
    dir         = up ? PD_UP : (dn ? PD_DN : PD_NONE);
    state_n     = state;
    step_n      = step;
    dir_last_n  = dir_last;
    move        = 1'b0;
    toward_more = 1'b1;

    unique case (state)
      ST_INIT: begin
        move    = 1'b1;
        state_n = ST_SRCH_UP;
      end
      ST_SRCH_UP: begin
        if (dir == PD_UP) begin
          move = 1'b1;
        end else if (dir == PD_DN) begin
          move    = 1'b1;
          state_n = ST_SRCH_DN;
        end
      end
      ST_SRCH_DN: begin
        if (dir == PD_DN) begin
          move = 1'b1;
        end else if (dir == PD_UP) begin
          // first direction change: halve the step, move against the PD
          move        = 1'b1;
          toward_more = 1'b0;
          dir_last_n  = PD_UP;
          if (step == K'(1)) begin
            state_n = ST_LOCKED;
          end else begin
            step_n  = step >> 1;
            state_n = ST_CONVERGE;
          end
        end
      end
      ST_CONVERGE: begin
        if (dir != PD_NONE) begin
          move        = 1'b1;
          toward_more = (dir == PD_DN);
          dir_last_n  = dir;
          if (dir != dir_last) begin
            if (step == K'(1)) state_n = ST_LOCKED;
            else               step_n  = step >> 1;
          end
        end
      end
      ST_LOCKED: begin
        if (dir != PD_NONE) begin
          move        = 1'b1;
          toward_more = (dir == PD_DN);
          dir_last_n  = dir;
        end
      end
      default: state_n = ST_INIT;
    endcase

    if (!move)            code_n = code;
    else if (toward_more) code_n = add_sat(code, step_n);
    else                  code_n = sub_sat(code, step_n);
    upd = move;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_INIT;
      code     <= '0;
      step     <= K'(S_INIT);
      dir_last <= PD_NONE;
      lock     <= 1'b0;
    end else begin
      state    <= state_n;
      code     <= code_n;
      step     <= step_n;
      dir_last <= dir_last_n;
      lock     <= (state_n == ST_LOCKED);
    end
  end
endmodule
