// wallace_tree: carry-save adder tree that reduces M vectors of W bits to two.
//
// Layer l takes its vectors three at a time; each group of three goes into one
// carry-save adder (csa) and comes out as a sum and a carry vector. Vectors
// left over when the count is not a multiple of three pass to the next layer
// unchanged. So each layer shrinks the count by about 3:2, and the tree has as
// many layers as it takes to reach two vectors: 8 -> 6 -> 4 -> 3 -> 2 (four
// layers) for 8 inputs, 16 -> 11 -> 8 -> 6 -> 4 -> 3 -> 2 (six) for 16. The
// two outputs still need one carry-propagate addition: sum + carry equals the
// sum of all inputs modulo 2^W.
//
// Layer sizes come from the constant functions in mixer_pkg. Purely
// combinational; the delay is one full adder per layer, growing with log(M).
// The 3:2 layering follows the design description; working on whole W-bit
// vectors rather than on individual bit columns is this design's choice.
module wallace_tree
  import mixer_pkg::*;
#(
  parameter int unsigned W = 64,
  parameter int unsigned M = 16
) (
  input  logic [M-1:0][W-1:0] vin,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);

  localparam int L = wt_levels(M);

  // v[l] holds the vectors entering layer l; v[L] holds the final two.
  // Entries above the layer's vector count are tied to zero.
  logic [M-1:0][W-1:0] v [L+1];

  assign v[0] = vin;

  for (genvar l = 0; l < L; l++) begin : g_layer
    localparam int NI = wt_count(M, l);
    localparam int NG = NI / 3;
    localparam int NO = wt_count(M, l + 1);

    for (genvar k = 0; k < NG; k++) begin : g_csa
      csa #(.W(W)) u_csa (
        .x(v[l][3*k]),
        .y(v[l][3*k+1]),
        .z(v[l][3*k+2]),
        .s(v[l+1][2*k]),
        .c(v[l+1][2*k+1])
      );
    end

    for (genvar r = 0; r < NI % 3; r++) begin : g_pass
      assign v[l+1][2*NG+r] = v[l][3*NG+r];
    end

    for (genvar u = NO; u < M; u++) begin : g_zero
      assign v[l+1][u] = '0;
    end
  end

  assign sum = v[L][0];
  if (M > 1) begin : g_two
    assign carry = v[L][1];
  end else begin : g_one
    assign carry = '0;
  end

endmodule
