// twos_comp: W-bit two's complement unit, y = -x (mod 2^W).
//
// Every bit of x is inverted and one is added by an incrementer chain: bit k
// of the result is ~x[k] xor the carry into it, and the carry passes on only
// while all lower inverted bits are ones. The delay therefore grows linearly
// with W. For x = -2^(W-1) the result wraps to x itself; callers that need
// that case extend x by one bit first.
//
// Purely combinational. A separate two's complement unit of W bits in and W
// bits out follows the design description; the incrementer chain is this
// design's own choice of insides.
module twos_comp #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] nx;
  logic [W-1:0] cy;   // carry into each bit

  assign nx    = ~x;
  assign cy[0] = 1'b1;

  for (genvar k = 0; k < W; k++) begin : g_inc
    assign y[k] = nx[k] ^ cy[k];
    if (k < W - 1) begin : g_cy
      assign cy[k+1] = nx[k] & cy[k];
    end
  end

endmodule
