// add_sub: W-bit ripple-carry adder/subtractor.
//
// sub = 0 gives s = a + b, sub = 1 gives s = a - b, formed as a + ~b + 1: every
// bit of b is inverted and the carry into bit 0 is set. The carry then ripples
// through W full adders, so the delay grows linearly with W. Outputs:
//   s      the W-bit result, modulo 2^W;
//   cout   the carry out of bit W-1 (for unsigned use);
//   s_ext  the exact W+1-bit two's complement result. Its top bit is the sign
//          bit of the sign-extended sum, a[W-1] ^ ~b[W-1]/b[W-1] ^ cout, so no
//          overflow can occur.
//
// Purely combinational. An add/subtract unit with a mode bit, a carry out and
// a delay that grows by about one logic level per bit follows the design
// description; the ripple structure and the s_ext output are this design's
// choices. It also serves as the final "n-bit adder" of the multiplier.
module add_sub #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         cout,
  output logic [W:0]   s_ext
);

  logic [W-1:0] bx;   // b, inverted when subtracting
  logic [W:0]   cy;   // ripple carries, cy[0] is the carry in

  assign bx    = b ^ {W{sub}};
  assign cy[0] = sub;

  for (genvar k = 0; k < W; k++) begin : g_fa
    assign s[k]    = a[k] ^ bx[k] ^ cy[k];
    assign cy[k+1] = (a[k] & bx[k]) | (cy[k] & (a[k] ^ bx[k]));
  end

  assign cout  = cy[W];
  assign s_ext = {a[W-1] ^ bx[W-1] ^ cy[W], s};

endmodule
