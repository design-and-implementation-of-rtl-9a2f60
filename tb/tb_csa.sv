// tb_csa: self-checking testbench for the carry-save adder.
// Applies corner and random 64-bit triples and checks that the sum vector is
// the bitwise parity of the inputs and that sum + carry equals x + y + z
// modulo 2^64. Combinational: outputs are sampled 1 ns after each change.
module tb_csa;
  localparam int unsigned W = 64;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  csa #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  task automatic apply(input logic [W-1:0] xa, ya, za);
    logic [W-1:0] ref_total;
    x = xa; y = ya; z = za;
    #1;
    ref_total = xa + ya + za;
    checks++;
    if (s != (xa ^ ya ^ za) || (s + c) != ref_total) begin
      failures++;
      $display("FAIL csa x=%h y=%h z=%h s=%h c=%h", xa, ya, za, s, c);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, 64'd1, '0);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, '1);
    for (int k = 0; k < 2000; k++) apply(rnd(), rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
