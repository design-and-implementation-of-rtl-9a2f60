// tb_wallace_tree: self-checking testbench for the carry-save adder tree.
// Feeds random and corner vectors to trees of 16 x 64 bits (the default),
// 8 x 16 bits (the size of the textbook 8 x 8 example) and 3 x 8 bits, and
// checks that sum + carry equals the sum of all inputs modulo 2^W.
module tb_wallace_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0][63:0] v16;
  logic [63:0]       s16, c16;
  logic [7:0][15:0]  v8;
  logic [15:0]       s8, c8;
  logic [2:0][7:0]   v3;
  logic [7:0]        s3, c3;

  wallace_tree                 dut16 (.vin(v16), .sum(s16), .carry(c16));
  wallace_tree #(.W(16), .M(8)) dut8 (.vin(v8),  .sum(s8),  .carry(c8));
  wallace_tree #(.W(8),  .M(3)) dut3 (.vin(v3),  .sum(s3),  .carry(c3));

  task automatic check();
    logic [63:0] t16;
    logic [15:0] t8;
    logic [7:0]  t3;
    #1;
    t16 = '0; t8 = '0; t3 = '0;
    for (int k = 0; k < 16; k++) t16 += v16[k];
    for (int k = 0; k < 8; k++)  t8  += v8[k];
    for (int k = 0; k < 3; k++)  t3  += v3[k];
    checks += 3;
    if (s16 + c16 != t16) begin failures++; $display("FAIL tree16"); end
    if (s8 + c8 != t8)    begin failures++; $display("FAIL tree8");  end
    if (s3 + c3 != t3)    begin failures++; $display("FAIL tree3");  end
  endtask

  initial begin
    v16 = '1; v8 = '1; v3 = '1; check();
    v16 = '0; v8 = '0; v3 = '0; check();
    for (int k = 0; k < 16; k++) v16[k] = 64'h8000_0000_0000_0000;
    check();
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 16; k++) v16[k] = {$urandom(), $urandom()};
      for (int k = 0; k < 8; k++)  v8[k]  = 16'($urandom());
      for (int k = 0; k < 3; k++)  v3[k]  = 8'($urandom());
      check();
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
