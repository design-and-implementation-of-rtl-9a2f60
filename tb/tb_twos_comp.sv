// tb_twos_comp: self-checking testbench for the two's complement unit.
// Checks y == -x (mod 2^W) for corner values (0, 1, all ones, the most
// negative number) and random values, at the default width of 32 bits and
// exhaustively at 8 bits.
module tb_twos_comp;
  logic [31:0] x32, y32;
  logic [7:0]  x8, y8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  twos_comp dut (.x(x32), .y(y32));
  twos_comp #(.W(8)) dut8 (.x(x8), .y(y8));

  task automatic apply32(input logic [31:0] v);
    x32 = v;
    #1;
    checks++;
    if (y32 != 32'(0 - v)) begin
      failures++;
      $display("FAIL tc32 x=%h y=%h", v, y32);
    end
  endtask

  initial begin
    apply32(32'h0);
    apply32(32'h1);
    apply32(32'hFFFF_FFFF);
    apply32(32'h8000_0000);
    apply32(32'h7FFF_FFFF);
    for (int k = 0; k < 2000; k++) apply32($urandom());
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      checks++;
      if (y8 != 8'(256 - v)) begin
        failures++;
        $display("FAIL tc8 x=%h y=%h", x8, y8);
      end
    end
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
