`timescale 1ns/1ps
// tb_delay_circuit: checks that after a commutation the mask lasts Dth
// microseconds, that the multiplexer select changes only at its end (with a
// select pulse), that Dth <= 0 switches at once, and that a new commutation
// restarts the delay.
module tb_delay_circuit;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic us_tick = 0, comm = 0;
  phase_sel_e next_sel, sel;
  logic signed [11:0] dth;
  logic mask, select;
  logic [11:0] count;
  int checks = 0, failures = 0;
  int us = 0;

  always #5 clk = ~clk;

  delay_circuit dut (.*);

  // 1 us = 10 clocks
  always begin
    repeat (9) @(posedge clk);
    us_tick <= 1;
    @(posedge clk);
    us_tick <= 0;
    us++;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic commutate(input phase_sel_e s);
    @(posedge clk); comm <= 1; next_sel <= s;
    @(posedge clk); comm <= 0;
    @(posedge clk);
  endtask

  task automatic run(input int d, input phase_sel_e from, input phase_sel_e to);
    int t0, npulse;
    dth = 12'(d);
    chk("sel before", sel == from);
    commutate(to);
    t0 = us;
    if (d <= 0) begin
      chk("immediate switch", sel == to && !mask);
    end else begin
      chk("mask raised", mask && sel == from);
      npulse = 0;
      while (mask) begin
        @(posedge clk);
        if (select) npulse++;
        if (mask && sel != from) chk("sel changed during mask", 0);
      end
      @(posedge clk); if (select) npulse++;
      chk($sformatf("mask length %0d us for Dth=%0d", us - t0, d), us - t0 == d);
      chk("sel after mask", sel == to);
      chk("one select pulse", npulse == 1);
    end
  endtask

  initial begin
    dth = 10; next_sel = SEL_C;
    #22 rst_n = 1;
    repeat (20) @(posedge clk);
    chk("reset sel", sel == SEL_C && !mask);
    run(10, SEL_C, SEL_B);
    run(37, SEL_B, SEL_A);
    run(1, SEL_A, SEL_C);
    run(0, SEL_C, SEL_B);
    run(-5, SEL_B, SEL_A);
    run(2047, SEL_A, SEL_C);
    // restart: a second commutation during the delay
    dth = 20;
    commutate(SEL_B);
    repeat (100) @(posedge clk);
    commutate(SEL_A);
    begin
      int t0;
      t0 = us;
      while (mask) @(posedge clk);
      chk("restarted delay", us - t0 == 20 && sel == SEL_A);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
