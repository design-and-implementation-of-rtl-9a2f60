// mode_sel: operand selection for the three mixer modes and for real input.
//
//   MIX_NORMAL    data (I, Q) and oscillator (cos, sin) pass unchanged;
//   MIX_DIS_OSC   cos is replaced by BYPASS_ONE and sin by 0, so the data
//                 reaches the outputs without being mixed;
//   MIX_DIS_DATA  I is replaced by BYPASS_ONE and Q by 0, so the oscillator
//                 samples reach the outputs;
//   real_in = 1   the Q data path is replaced by 0 (real input signal).
// The constants and the three modes follow the design description, which
// gives the "one" constant as all ones (0xFFFF at 16 bits). Read as a two's
// complement number that is -1, so a bypassed signal arrives at the mixer
// outputs exact but sign-inverted; set BYPASS_ONE to another value to change
// that. The 2-bit mode encoding and the code 2'd3 acting as MIX_NORMAL are
// this design's choices.
//
// Purely combinational.
module mode_sel
  import mixer_pkg::*;
#(
  parameter int unsigned  N          = 32,
  parameter logic [N-1:0] BYPASS_ONE = '1
) (
  input  logic [N-1:0] i_in,
  input  logic [N-1:0] q_in,
  input  logic [N-1:0] cos_in,
  input  logic [N-1:0] sin_in,
  input  mix_mode_e    mode,
  input  logic         real_in,
  output logic [N-1:0] i_sel,
  output logic [N-1:0] q_sel,
  output logic [N-1:0] cos_sel,
  output logic [N-1:0] sin_sel
);

  always_comb begin
    i_sel   = i_in;
    q_sel   = real_in ? '0 : q_in;
    cos_sel = cos_in;
    sin_sel = sin_in;
    unique case (mode)
      MIX_DIS_OSC: begin
        cos_sel = BYPASS_ONE;
        sin_sel = '0;
      end
      MIX_DIS_DATA: begin
        i_sel = BYPASS_ONE;
        q_sel = '0;
      end
      default: ;  // MIX_NORMAL and the unused code
    endcase
  end

endmodule
