// booth_pp: radix-4 (modified) Booth recoder and partial-product generator.
//
// The N-bit signed multiplier b, with a 0 appended below its LSB, is read in
// N/2 overlapping 3-bit groups {b[2g+1], b[2g], b[2g-1]}. Each group is a
// Booth digit in {-2, -1, 0, +1, +2}:
//   000, 111 -> 0     001, 010 -> +A     011 -> +2A
//   100 -> -2A        101, 110 -> -A
// A run of ones in b thus costs one subtraction at its start and one addition
// past its end, and only N/2 partial products are needed instead of N. Digit g
// selects its multiple of the multiplicand a, sign-extends it to 2N bits and
// shifts it left by 2g places, giving pp[g]. The sum of all pp[g] modulo 2^2N
// is the signed product a*b.
//
// -A is formed once, by the two's complement unit at N+1 bits, so that
// -(-2^(N-1)) is representable; -2A is that value shifted by one.
//
// Purely combinational. N must be even and at least 4. That Booth recoding
// reduces the number of partial products follows the design description; the
// radix-4 table, the full sign extension and the output layout are this
// design's choices.
module booth_pp #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]              a,
  input  logic [N-1:0]              b,
  output logic [N/2-1:0][2*N-1:0]   pp
);

  localparam int unsigned G = N / 2;

  logic [N:0] a_ext;   // a sign-extended to N+1 bits
  logic [N:0] a_neg;   // -a, N+1 bits
  logic [N:0] bz;      // b with the implicit 0 below its LSB

  assign a_ext = {a[N-1], a};
  assign bz    = {b, 1'b0};

  twos_comp #(.W(N + 1)) u_neg (
    .x(a_ext),
    .y(a_neg)
  );

  for (genvar g = 0; g < G; g++) begin : g_digit
    logic [2:0]   grp;
    logic [N+1:0] mult;   // selected multiple, N+2-bit signed
    logic [2*N-1:0] mext;

    assign grp = bz[2*g+2 -: 3];

    always_comb begin
      unique case (grp)
        3'b001, 3'b010: mult = {a_ext[N], a_ext};
        3'b011:         mult = {a_ext, 1'b0};
        3'b100:         mult = {a_neg, 1'b0};
        3'b101, 3'b110: mult = {a_neg[N], a_neg};
        default:        mult = '0;   // 000, 111
      endcase
    end

    assign mext  = {{(N - 2){mult[N+1]}}, mult};
    assign pp[g] = mext << (2 * g);
  end

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("booth_pp: N must be even and at least 4");
  end

endmodule
