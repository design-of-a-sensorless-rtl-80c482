`timescale 1ns/1ps
// tb_residue_amp: runs the residue amplifier through reset and output phases
// with two opamp offsets and checks vout = vcm + vx - (va+vb+vc)/3, i.e. that
// the offset cancels, and that vout holds between output phases.
module tb_residue_amp;
  logic clk1 = 0, clk2 = 0;
  real vx, va, vb, vc, vcm, vout0, vout1;
  int checks = 0, failures = 0;

  residue_amp #(.VOFF(0.0))  dut0 (.clk1, .clk2, .vx, .va, .vb, .vc, .vcm, .vout(vout0));
  residue_amp #(.VOFF(0.05)) dut1 (.clk1, .clk2, .vx, .va, .vb, .vc, .vcm, .vout(vout1));

  task automatic cycle_and_check(input real x, input real a, input real b, input real c);
    real exp, held;
    vx = x; va = a; vb = b; vc = c;
    #10 clk1 = 1; #100 clk1 = 0;
    #10 clk2 = 1; #1;
    exp = vcm + x - (a + b + c) / 3.0;
    checks++;
    if (vout0 - exp > 1e-9 || exp - vout0 > 1e-9 || vout1 - exp > 1e-9 || exp - vout1 > 1e-9) begin
      failures++; $display("FAIL vout %f / %f expected %f", vout0, vout1, exp);
    end
    held = vout1;
    #99 clk2 = 0;
    vx = 0.0; va = 3.0;           // inputs change while no phase is active
    #20;
    checks++;
    if (vout1 != held) begin failures++; $display("FAIL vout not held"); end
  endtask

  initial begin
    vcm = 1.65;
    cycle_and_check(1.2, 2.0, 0.0, 1.2);
    cycle_and_check(0.8, 0.0, 2.0, 0.8);
    for (int i = 0; i < 20; i++)
      cycle_and_check($urandom_range(3000) / 1000.0, $urandom_range(3000) / 1000.0,
                      $urandom_range(3000) / 1000.0, $urandom_range(3000) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
