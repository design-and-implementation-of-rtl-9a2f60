// csa: word-level carry-save adder (3:2 compressor), the "CS Adder" of a
// Wallace tree.
//
// Three W-bit vectors x, y, z of equal weight go in; each bit position is one
// full adder. Its sum bit stays at weight n and goes to s; its carry bit has
// weight n+1 and, instead of rippling into the next full adder, is collected
// into a second vector c. c is delivered already shifted left by one place, so
// x + y + z == s + c (mod 2^W): the carry out of bit W-1 is dropped, which is
// exact for two's complement results that fit in W bits.
//
// Purely combinational; delay is one full adder regardless of W. Keeping the
// carries separate is how the design description defines a carry-save adder;
// delivering c pre-shifted and dropping the top carry is this design's choice.
module csa #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-2:0] maj;   // carries of bits 0..W-2; the carry of bit W-1 is dropped

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    c   = {maj, 1'b0};
  end

endmodule
