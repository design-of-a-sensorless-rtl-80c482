`timescale 1ns/1ps
// tb_bemf_mux: checks that each select code passes the right terminal voltage.
module tb_bemf_mux;
  real va, vb, vc, vx;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  bemf_mux dut (.*);

  task automatic chk(input logic [1:0] s, input real exp);
    sel = s; #1;
    checks++;
    if (vx != exp) begin failures++; $display("FAIL sel=%0d vx=%f expected %f", s, vx, exp); end
  endtask

  initial begin
    for (int i = 0; i < 10; i++) begin
      va = 0.1 * i; vb = 1.0 + 0.2 * i; vc = 3.0 - 0.3 * i;
      chk(2'b00, va); chk(2'b01, vb); chk(2'b10, vc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
