// tb_booth_pp: self-checking testbench for the radix-4 Booth partial-product
// generator. Each partial product is compared with d_g * a * 4^g, where the
// Booth digit d_g = -2*b[2g+1] + b[2g] + b[2g-1] is computed here from the
// multiplier bits; the sum of all partial products must equal a*b modulo
// 2^2N. Exhaustive at N = 8, random and corner values at the default N = 32.
module tb_booth_pp;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]        a8, b8;
  logic [3:0][15:0]  pp8;
  logic [31:0]       a32, b32;
  logic [15:0][63:0] pp32;

  booth_pp #(.N(8)) dut8  (.a(a8),  .b(b8),  .pp(pp8));
  booth_pp          dut32 (.a(a32), .b(b32), .pp(pp32));

  function automatic int digit(input logic [63:0] bv, input int g);
    int lo;
    lo = (g == 0) ? 0 : int'(bv[2*g-1]);
    return -2 * int'(bv[2*g+1]) + int'(bv[2*g]) + lo;
  endfunction

  task automatic check8();
    logic signed [15:0] tot, ref_p, exp_pp;
    tot = '0;
    for (int g = 0; g < 4; g++) begin
      exp_pp = 16'(digit(64'(b8), g)) * 16'($signed(a8)) <<< (2 * g);
      checks++;
      if (pp8[g] != exp_pp) begin
        failures++;
        $display("FAIL pp8 a=%h b=%h g=%0d pp=%h exp=%h", a8, b8, g, pp8[g], exp_pp);
      end
      tot += pp8[g];
    end
    ref_p = 16'($signed(a8)) * 16'($signed(b8));
    checks++;
    if (tot != ref_p) begin
      failures++;
      $display("FAIL sum8 a=%h b=%h", a8, b8);
    end
  endtask

  task automatic check32();
    logic signed [63:0] tot, ref_p, exp_pp;
    tot = '0;
    for (int g = 0; g < 16; g++) begin
      exp_pp = 64'(digit(64'(b32), g)) * 64'($signed(a32)) <<< (2 * g);
      checks++;
      if (pp32[g] != exp_pp) begin
        failures++;
        $display("FAIL pp32 a=%h b=%h g=%0d", a32, b32, g);
      end
      tot += pp32[g];
    end
    ref_p = 64'($signed(a32)) * 64'($signed(b32));
    checks++;
    if (tot != ref_p) begin
      failures++;
      $display("FAIL sum32 a=%h b=%h", a32, b32);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      check8();
    end
    a32 = 32'h8000_0000; b32 = 32'h8000_0000; #1; check32();
    a32 = 32'h7FFF_FFFF; b32 = 32'h8000_0000; #1; check32();
    a32 = 32'h8000_0000; b32 = 32'hAAAA_AAAA; #1; check32();
    a32 = 32'hFFFF_FFFF; b32 = 32'h5555_5555; #1; check32();
    for (int k = 0; k < 2000; k++) begin
      a32 = $urandom(); b32 = $urandom();
      #1;
      check32();
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
