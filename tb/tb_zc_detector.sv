`timescale 1ns/1ps
// tb_zc_detector: sweeps the input up and down across the threshold and
// checks that the output switches only beyond +-HYST/2 and holds inside the
// band, so a small ripple around the threshold gives no extra edges.
module tb_zc_detector;
  real vin, vref;
  logic zcs;
  int checks = 0, failures = 0;
  int edges = 0;
  logic zd;

  zc_detector #(.HYST(0.02)) dut (.*);

  always @(zcs) edges++;

  task automatic set_chk(input real v, input logic exp);
    vin = v; #1;
    checks++;
    if (zcs !== exp) begin failures++; $display("FAIL vin=%f zcs=%b expected %b", v, zcs, exp); end
  endtask

  initial begin
    vref = 1.65;
    set_chk(1.0, 0);
    set_chk(1.645, 0);
    set_chk(1.659, 0);   // inside the band: hold low
    set_chk(1.661, 1);
    set_chk(1.655, 1);   // inside the band: hold high
    set_chk(1.641, 1);
    set_chk(1.639, 0);
    edges = 0;
    for (int i = 0; i < 50; i++) begin
      vin = 1.65 + ((i % 2) ? 0.008 : -0.008); #1;
    end
    checks++;
    if (edges != 0) begin failures++; $display("FAIL ripple produced %0d edges", edges); end
    set_chk(3.0, 1);
    set_chk(0.0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
