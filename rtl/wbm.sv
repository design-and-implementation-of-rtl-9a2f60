// wbm: Wallace-tree-with-Booth multiplier, p = a * b for N-bit signed
// (two's complement) operands, 2N-bit signed product.
//
// Three stages, all combinational:
//   1. booth_pp recodes b into N/2 radix-4 Booth digits and produces N/2
//      partial products of 2N bits (half the N an AND-array would need);
//   2. wallace_tree reduces them with layers of carry-save adders to one sum
//      and one carry vector, in about log1.5(N/2) full-adder delays;
//   3. add_sub, in add mode, is the final carry-propagate ("n-bit") adder.
// The product is exact: -2^(N-1) * -2^(N-1) = 2^(2N-2) still fits in 2N bits.
//
// Interface: two N-bit inputs, one 2N-bit output, no clock. Combining Booth
// recoding with a Wallace tree and a final adder follows the design
// description; the radix-4 recoding, the ripple-carry final adder and the
// full sign extension of the partial products are this design's choices.
module wbm #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned G = N / 2;

  logic [G-1:0][2*N-1:0] pp;
  logic [2*N-1:0]        tree_sum;
  logic [2*N-1:0]        tree_carry;
  logic                  fin_cout;   // carry out of the final adder: weight 2^2N, discarded
  logic [2*N:0]          fin_ext;    // exact sum of the two vectors: not needed, top bit discarded

  booth_pp #(.N(N)) u_booth (
    .a (a),
    .b (b),
    .pp(pp)
  );

  wallace_tree #(.W(2 * N), .M(G)) u_tree (
    .vin  (pp),
    .sum  (tree_sum),
    .carry(tree_carry)
  );

  add_sub #(.W(2 * N)) u_final (
    .a    (tree_sum),
    .b    (tree_carry),
    .sub  (1'b0),
    .s    (p),
    .cout (fin_cout),
    .s_ext(fin_ext)
  );

endmodule
