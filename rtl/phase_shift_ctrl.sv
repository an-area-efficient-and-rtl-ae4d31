`timescale 1ps/1fs
// phase_shift_ctrl: phase shift controller between the master DLL and the
// per-pin phase shifters.
//
// The master DLL's locked code CODE_DCPS-360 stands for one reference
// period. A DCPS-90 with the same CDU step delays by a quarter period when
// its code is one-fourth of CODE_DCPS-360 (code360 >> SHIFT with SHIFT = 2;
// the 12-bit master code then fits the 10-bit slave code). For per-pin
// deskew each channel adds its own signed trim, in fine steps (T_CDU/32,
// about 3 ps), set by the link controller after its timing training. The
// sum saturates at 0 and 2^K_SLAVE - 1.
//
// Interface: code360 and trim[] are sampled on clk (the controller clock),
// code90[] is registered, so a new master code reaches the slaves one clock
// later. Reset clears the codes.
//
// The quarter-code rule and the controller's place between master and
// slaves follow the master-slave architecture; the trim input, its width and
// the saturation are this design's.
module phase_shift_ctrl #(
  parameter int unsigned N_CH     = 2,
  parameter int unsigned K_MASTER = 12,
  parameter int unsigned K_SLAVE  = 10,
  parameter int unsigned SHIFT    = 2,
  parameter int unsigned TRIM_W   = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [K_MASTER-1:0]      code360,
  input  logic signed [TRIM_W-1:0] trim   [N_CH],
  output logic [K_SLAVE-1:0]       code90 [N_CH]
);
  localparam int unsigned SW = (K_MASTER > K_SLAVE ? K_MASTER : K_SLAVE) + 2;
  localparam int signed   MAXC = (1 << K_SLAVE) - 1;

  logic [K_MASTER-1:0] base;
  logic [K_SLAVE-1:0]  code_n [N_CH];

  always_comb begin
    base = code360 >> SHIFT;
    for (int i = 0; i < N_CH; i++) begin
      automatic logic signed [SW-1:0] s = $signed(SW'(base)) + SW'(trim[i]);
      if (s < 0)                      code_n[i] = '0;
      else if (s > SW'(MAXC))         code_n[i] = K_SLAVE'(MAXC);
      else                            code_n[i] = s[K_SLAVE-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CH; i++) code90[i] <= '0;
    end else begin
      code90 <= code_n;
    end
  end
endmodule
