// tb_mixer_resolutions: the mixer built at the other data resolutions of the
// design family, N = 4, 8, 16 and 64 (the default, 32, is covered by
// tb_mixer). Each instance gets random operands in every mode with real and
// complex input and is checked against (2N+1)-bit signed arithmetic; the
// 4-bit instance is also run over all 2^16 operand combinations in normal
// mode.
module tb_mixer_resolutions;
  import mixer_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mix_mode_e mode;
  logic      real_in;

  logic [3:0]  i4, q4, c4, s4;      logic [8:0]   io4, qo4;
  logic [7:0]  i8, q8, c8, s8;      logic [16:0]  io8, qo8;
  logic [15:0] i16, q16, c16, s16;  logic [32:0]  io16, qo16;
  logic [63:0] i64, q64, c64, s64;  logic [128:0] io64, qo64;

  mixer #(.N(4))  dut4  (.i_in(i4),  .q_in(q4),  .cos_in(c4),  .sin_in(s4),  .mode(mode), .real_in(real_in), .i_out(io4),  .q_out(qo4));
  mixer #(.N(8))  dut8  (.i_in(i8),  .q_in(q8),  .cos_in(c8),  .sin_in(s8),  .mode(mode), .real_in(real_in), .i_out(io8),  .q_out(qo8));
  mixer #(.N(16)) dut16 (.i_in(i16), .q_in(q16), .cos_in(c16), .sin_in(s16), .mode(mode), .real_in(real_in), .i_out(io16), .q_out(qo16));
  mixer #(.N(64)) dut64 (.i_in(i64), .q_in(q64), .cos_in(c64), .sin_in(s64), .mode(mode), .real_in(real_in), .i_out(io64), .q_out(qo64));

  // Reference on 129-bit signed values; n = resolution of the instance.
  task automatic expect_out(input logic signed [128:0] i, q, c, s, input int n,
                            input logic [128:0] got_i, got_q);
    logic signed [128:0] ri, rq;
    logic [128:0] mask;
    if (real_in) q = 0;
    if (mode == MIX_DIS_OSC)  begin c = -1; s = 0; end
    if (mode == MIX_DIS_DATA) begin i = -1; q = 0; end
    ri = i * c + q * s;
    rq = q * c - i * s;
    mask = (n == 64) ? '1 : ((129'(1) << (2 * n + 1)) - 1);
    checks++;
    if ((got_i & mask) != (ri & mask) || (got_q & mask) != (rq & mask)) begin
      failures++;
      $display("FAIL N=%0d mode=%0d real=%0b got %h %h exp %h %h", n, mode, real_in,
               got_i, got_q, ri & mask, rq & mask);
    end
  endtask

  task automatic check_all();
    #1;
    expect_out(129'($signed(i4)),  129'($signed(q4)),  129'($signed(c4)),  129'($signed(s4)),  4,  129'(io4),  129'(qo4));
    expect_out(129'($signed(i8)),  129'($signed(q8)),  129'($signed(c8)),  129'($signed(s8)),  8,  129'(io8),  129'(qo8));
    expect_out(129'($signed(i16)), 129'($signed(q16)), 129'($signed(c16)), 129'($signed(s16)), 16, 129'(io16), 129'(qo16));
    expect_out(129'($signed(i64)), 129'($signed(q64)), 129'($signed(c64)), 129'($signed(s64)), 64, io64, qo64);
  endtask

  initial begin
    mode = MIX_NORMAL; real_in = 1'b0;
    for (int v = 0; v < 65536; v++) begin
      {i4, q4, c4, s4} = 16'(v);
      #1;
      expect_out(129'($signed(i4)), 129'($signed(q4)), 129'($signed(c4)), 129'($signed(s4)), 4, 129'(io4), 129'(qo4));
    end
    i64 = {1'b1, 63'b0}; q64 = i64; c64 = i64; s64 = i64;
    check_all();
    for (int n = 0; n < 4000; n++) begin
      mode = mix_mode_e'(n % 4);
      real_in = n[2];
      {i4, q4, c4, s4} = 16'($urandom());
      {i8, q8, c8, s8} = $urandom();
      {i16, q16} = $urandom(); {c16, s16} = $urandom();
      i64 = {$urandom(), $urandom()}; q64 = {$urandom(), $urandom()};
      c64 = {$urandom(), $urandom()}; s64 = {$urandom(), $urandom()};
      check_all();
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
