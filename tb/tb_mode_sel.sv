// tb_mode_sel: self-checking testbench for the mixer's operand selection.
// For every mode and both values of real_in, with random operands, checks
// the four selected operands against the table: normal mix passes all,
// oscillator-disable puts all ones on cos and 0 on sin, data-disable puts
// all ones on I and 0 on Q, and real input puts 0 on Q.
module tb_mode_sel;
  import mixer_pkg::*;
  localparam int unsigned N = 32;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] i_in, q_in, cos_in, sin_in, i_sel, q_sel, cos_sel, sin_sel;
  mix_mode_e    mode;
  logic         real_in;

  mode_sel dut (.*);

  initial begin
    logic [N-1:0] ei, eq, ec, es;
    for (int n = 0; n < 500; n++) begin
      for (int m = 0; m < 4; m++) begin
        for (int r = 0; r < 2; r++) begin
          i_in = $urandom(); q_in = $urandom(); cos_in = $urandom(); sin_in = $urandom();
          mode = mix_mode_e'(m);
          real_in = r[0];
          #1;
          ei = i_in; eq = r[0] ? 32'h0 : q_in; ec = cos_in; es = sin_in;
          if (m == 1) begin ec = 32'hFFFF_FFFF; es = 32'h0; end
          if (m == 2) begin ei = 32'hFFFF_FFFF; eq = 32'h0; end
          checks++;
          if (i_sel != ei || q_sel != eq || cos_sel != ec || sin_sel != es) begin
            failures++;
            $display("FAIL mode=%0d real=%0d", m, r);
          end
        end
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
