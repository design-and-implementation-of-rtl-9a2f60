// tb_add_sub: self-checking testbench for the ripple-carry adder/subtractor.
// For add and subtract, checks the W-bit result, the carry out (from a
// (W+1)-bit unsigned sum of a, b or ~b, and the carry in) and the exact
// signed result s_ext against arithmetic on sign-extended operands, at the
// default width of 64 bits and exhaustively at 4 bits.
module tb_add_sub;
  localparam int unsigned W = 64;
  logic [W-1:0] a, b, s;
  logic         sub, cout;
  logic [W:0]   s_ext;
  logic [3:0]   a4, b4, s4;
  logic         sub4, cout4;
  logic [4:0]   s_ext4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  add_sub dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout), .s_ext(s_ext));
  add_sub #(.W(4)) dut4 (.a(a4), .b(b4), .sub(sub4), .s(s4), .cout(cout4), .s_ext(s_ext4));

  task automatic apply(input logic [W-1:0] av, bv, input logic sv);
    logic signed [W:0] ea, eb, eref;
    logic [W:0] uref;
    a = av; b = bv; sub = sv;
    #1;
    ea   = {av[W-1], av};
    eb   = {bv[W-1], bv};
    eref = sv ? ea - eb : ea + eb;
    uref = sv ? {1'b0, av} + {1'b0, ~bv} + 1 : {1'b0, av} + {1'b0, bv};
    checks++;
    if (s != eref[W-1:0] || s_ext != eref || cout != uref[W]) begin
      failures++;
      $display("FAIL add_sub a=%h b=%h sub=%b s=%h cout=%b s_ext=%h", av, bv, sv, s, cout, s_ext);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    logic [W-1:0] mn, mx;
    mn = {1'b1, {(W-1){1'b0}}};
    mx = {1'b0, {(W-1){1'b1}}};
    for (int sv = 0; sv < 2; sv++) begin
      apply(mx, mx, sv[0]);
      apply(mn, mn, sv[0]);
      apply(mx, mn, sv[0]);
      apply(mn, mx, sv[0]);
      apply('1, 64'd1, sv[0]);
      apply('0, '0, sv[0]);
      for (int k = 0; k < 1500; k++) apply(rnd(), rnd(), sv[0]);
    end
    for (int v = 0; v < 512; v++) begin
      logic signed [4:0] r;
      {sub4, a4, b4} = 9'(v);
      #1;
      r = sub4 ? $signed({a4[3], a4}) - $signed({b4[3], b4}) : $signed({a4[3], a4}) + $signed({b4[3], b4});
      checks++;
      if (s_ext4 != r) begin
        failures++;
        $display("FAIL add_sub4 a=%h b=%h sub=%b s_ext=%h", a4, b4, sub4, s_ext4);
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
