// mixer: complex multiplier / digital down-conversion mixer.
//
// Multiplies the complex input sample (I + jQ) by the conjugate oscillator
// phasor (cos - j sin) from a numerically controlled oscillator:
//   i_out = I*cos + Q*sin
//   q_out = Q*cos - I*sin
// which shifts the input spectrum down by the oscillator frequency. Four
// Wallace-tree/Booth multipliers (wbm) form the four products; one add_sub
// adds the first pair and a second add_sub, in subtract mode, forms the
// difference. mode_sel in front of the multipliers implements real input
// (Q forced to 0, giving I*(cos - j sin)) and the two bypass modes
// (oscillator disabled, data disabled). BYPASS_ONE is the constant those
// modes put in place of cos or I; its default, all ones, is -1 in two's
// complement, so a bypassed signal comes out exact but negated (see mode_sel).
//
// Interface: N-bit signed (two's complement) I, Q, cos and sin; mode and
// real_in; 2N+1-bit signed outputs holding the exact result (the extra top
// bit is the sign of the sum of two 2N-bit products). N is a compile-time
// resolution: 4, 8, 16, 32 or 64, any even N >= 4 works; 32 is the default.
// Timing: purely combinational, outputs follow inputs after the multiplier
// and adder delays; there is no clock, reset or pipeline register.
//
// The equations, the four-multiplier/adder/subtractor structure, the modes
// and the 2N+1-bit outputs follow the design description; the signed number
// format, the mode encoding and the absence of registers are this design's
// choices.
module mixer
  import mixer_pkg::*;
#(
  parameter int unsigned  N          = 32,
  parameter logic [N-1:0] BYPASS_ONE = '1   // "one" used by the bypass modes
) (
  input  logic [N-1:0] i_in,
  input  logic [N-1:0] q_in,
  input  logic [N-1:0] cos_in,
  input  logic [N-1:0] sin_in,
  input  mix_mode_e    mode,
  input  logic         real_in,
  output logic [2*N:0] i_out,
  output logic [2*N:0] q_out
);

  logic [N-1:0] i_sel, q_sel, cos_sel, sin_sel;
  logic [2*N-1:0] p_ic, p_qs, p_qc, p_is;
  logic [2*N-1:0] i_mod, q_mod;   // 2N-bit results: contained in i_out/q_out
  logic           i_cout, q_cout; // unsigned carries: not meaningful for signed data

  mode_sel #(.N(N), .BYPASS_ONE(BYPASS_ONE)) u_sel (
    .i_in   (i_in),
    .q_in   (q_in),
    .cos_in (cos_in),
    .sin_in (sin_in),
    .mode   (mode),
    .real_in(real_in),
    .i_sel  (i_sel),
    .q_sel  (q_sel),
    .cos_sel(cos_sel),
    .sin_sel(sin_sel)
  );

  wbm #(.N(N)) u_mul_ic (.a(i_sel), .b(cos_sel), .p(p_ic));
  wbm #(.N(N)) u_mul_qs (.a(q_sel), .b(sin_sel), .p(p_qs));
  wbm #(.N(N)) u_mul_qc (.a(q_sel), .b(cos_sel), .p(p_qc));
  wbm #(.N(N)) u_mul_is (.a(i_sel), .b(sin_sel), .p(p_is));

  add_sub #(.W(2 * N)) u_add_i (
    .a    (p_ic),
    .b    (p_qs),
    .sub  (1'b0),
    .s    (i_mod),
    .cout (i_cout),
    .s_ext(i_out)
  );

  add_sub #(.W(2 * N)) u_sub_q (
    .a    (p_qc),
    .b    (p_is),
    .sub  (1'b1),
    .s    (q_mod),
    .cout (q_cout),
    .s_ext(q_out)
  );

endmodule
