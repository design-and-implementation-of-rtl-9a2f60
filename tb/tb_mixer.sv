// tb_mixer: end-to-end testbench of the complex multiplier at its default
// resolution (N = 32, no parameter override).
//
// Reference model: the testbench applies the mode constants itself and
// computes I*cos + Q*sin and Q*cos - I*sin with (2N+1)-bit signed
// arithmetic. Stimulus: the 32-bit operand set of the published waveform
// test; 4-, 8- and 16-bit data sign-extended into the 32-bit datapath;
// extreme values; random values in every mode with real and complex input.
// Every mechanism of the design is counted and must occur at least once:
// normal mix, oscillator disable, data disable, real input, a negative
// result, and a result that needs the (2N+1)-th output bit.
// The datapath is combinational, so outputs must be valid 1 ns after the
// inputs change (zero clock cycles of latency).
module tb_mixer;
  import mixer_pkg::*;
  localparam int unsigned N = 32;
  int checks = 0, failures = 0;
  int n_normal = 0, n_dis_osc = 0, n_dis_data = 0, n_real = 0, n_neg = 0, n_wide = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] i_in, q_in, cos_in, sin_in;
  mix_mode_e    mode;
  logic         real_in;
  logic [2*N:0] i_out, q_out;

  mixer dut (.*);

  task automatic apply(input logic [N-1:0] iv, qv, cv, sv, input mix_mode_e mv, input logic rv);
    logic signed [2*N:0] ei, eq, ec, es, ri, rq;
    i_in = iv; q_in = qv; cos_in = cv; sin_in = sv; mode = mv; real_in = rv;
    #1;
    ei = (2*N+1)'($signed(iv));
    eq = rv ? '0 : (2*N+1)'($signed(qv));
    ec = (2*N+1)'($signed(cv));
    es = (2*N+1)'($signed(sv));
    if (mv == MIX_DIS_OSC)  begin ec = -1; es = 0; end
    if (mv == MIX_DIS_DATA) begin ei = -1; eq = 0; end
    ri = ei * ec + eq * es;
    rq = eq * ec - ei * es;
    checks++;
    if (i_out != ri || q_out != rq) begin
      failures++;
      $display("FAIL mode=%0d real=%0b i=%h q=%h c=%h s=%h -> i_out=%h q_out=%h exp %h %h",
               mv, rv, iv, qv, cv, sv, i_out, q_out, ri, rq);
    end
    case (mv)
      MIX_DIS_OSC:  n_dis_osc++;
      MIX_DIS_DATA: n_dis_data++;
      default:      n_normal++;
    endcase
    if (rv) n_real++;
    if (ri < 0 || rq < 0) n_neg++;
    if (ri[2*N] != ri[2*N-1] || rq[2*N] != rq[2*N-1]) n_wide++;
  endtask

  function automatic logic [N-1:0] sext(input logic [N-1:0] v, input int bits);
    logic [N-1:0] m;
    m = v & ((N'(1) << bits) - 1);
    return m[bits-1] ? (m | ~((N'(1) << bits) - 1)) : m;
  endfunction

  initial begin
    // operand set of the published 32-bit waveform test
    apply(32'h7A81_F501, 32'h7A81_F501, 32'h3281_6501, 32'h7A85_F509, MIX_NORMAL, 1'b0);
    // extremes: the sum of two products of most-negative numbers needs 2N+1 bits
    apply(32'h8000_0000, 32'h8000_0000, 32'h8000_0000, 32'h8000_0000, MIX_NORMAL, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 32'h8000_0000, 32'h7FFF_FFFF, MIX_NORMAL, 1'b0);
    apply(32'h7FFF_FFFF, 32'h7FFF_FFFF, 32'h7FFF_FFFF, 32'h7FFF_FFFF, MIX_NORMAL, 1'b0);
    // bypass modes pass the other operand pair through (sign-inverted, exact)
    apply(32'h1234_5678, 32'hCAFE_0001, 32'h0BAD_F00D, 32'h7777_0000, MIX_DIS_OSC, 1'b0);
    apply(32'h1234_5678, 32'hCAFE_0001, 32'h0BAD_F00D, 32'h7777_0000, MIX_DIS_DATA, 1'b0);
    // lower resolutions carried in the 32-bit datapath
    for (int bits = 4; bits <= 16; bits *= 2)
      for (int n = 0; n < 200; n++)
        apply(sext($urandom(), bits), sext($urandom(), bits), sext($urandom(), bits),
              sext($urandom(), bits), MIX_NORMAL, n[0]);
    // random, every mode, real and complex input
    for (int n = 0; n < 3000; n++)
      apply($urandom(), $urandom(), $urandom(), $urandom(), mix_mode_e'(n % 4), n[2]);
    $display("mechanisms: normal=%0d dis_osc=%0d dis_data=%0d real=%0d negative=%0d wide=%0d",
             n_normal, n_dis_osc, n_dis_data, n_real, n_neg, n_wide);
    if (n_normal == 0)   begin failures++; $display("FAIL normal mix never exercised"); end
    if (n_dis_osc == 0)  begin failures++; $display("FAIL oscillator disable never exercised"); end
    if (n_dis_data == 0) begin failures++; $display("FAIL data disable never exercised"); end
    if (n_real == 0)     begin failures++; $display("FAIL real input never exercised"); end
    if (n_neg == 0)      begin failures++; $display("FAIL negative result never produced"); end
    if (n_wide == 0)     begin failures++; $display("FAIL 2N+1-bit result never produced"); end
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
