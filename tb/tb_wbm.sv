// tb_wbm: self-checking testbench for the Wallace-tree/Booth multiplier.
// Compares the product with signed multiplication done in the testbench:
// exhaustively at N = 4 and N = 8, and with corner and random operands at the
// default N = 32 and at N = 64.
module tb_wbm;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   a4, b4;    logic [7:0]   p4;
  logic [7:0]   a8, b8;    logic [15:0]  p8;
  logic [31:0]  a32, b32;  logic [63:0]  p32;
  logic [63:0]  a64, b64;  logic [127:0] p64;

  wbm #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  wbm #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  wbm           dut32 (.a(a32), .b(b32), .p(p32));
  wbm #(.N(64)) dut64 (.a(a64), .b(b64), .p(p64));

  task automatic check_wide();
    logic signed [63:0]  r32;
    logic signed [127:0] r64;
    #1;
    r32 = 64'($signed(a32)) * 64'($signed(b32));
    r64 = 128'($signed(a64)) * 128'($signed(b64));
    checks += 2;
    if (p32 != r32) begin failures++; $display("FAIL wbm32 a=%h b=%h p=%h exp=%h", a32, b32, p32, r32); end
    if (p64 != r64) begin failures++; $display("FAIL wbm64 a=%h b=%h p=%h exp=%h", a64, b64, p64, r64); end
  endtask

  initial begin
    logic signed [15:0] r8;
    logic signed [7:0]  r4;
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      r4 = 8'($signed(a4)) * 8'($signed(b4));
      checks++;
      if (p4 != r4) begin failures++; $display("FAIL wbm4 a=%h b=%h p=%h", a4, b4, p4); end
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      r8 = 16'($signed(a8)) * 16'($signed(b8));
      checks++;
      if (p8 != r8) begin failures++; $display("FAIL wbm8 a=%h b=%h p=%h", a8, b8, p8); end
    end
    a32 = 32'h8000_0000; b32 = 32'h8000_0000; a64 = {1'b1, 63'b0}; b64 = {1'b1, 63'b0}; check_wide();
    a32 = 32'h7FFF_FFFF; b32 = 32'h8000_0000; a64 = {1'b0, {63{1'b1}}}; b64 = {1'b1, 63'b0}; check_wide();
    a32 = 32'hFFFF_FFFF; b32 = 32'hFFFF_FFFF; a64 = '1; b64 = '1; check_wide();
    a32 = 32'h7A81_F501; b32 = 32'h3281_6501; a64 = 64'h7A81_F501; b64 = 64'h7A85_F509; check_wide();
    for (int k = 0; k < 3000; k++) begin
      a32 = $urandom(); b32 = $urandom();
      a64 = {$urandom(), $urandom()}; b64 = {$urandom(), $urandom()};
      check_wide();
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
