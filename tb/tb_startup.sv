`timescale 1ns/1ps
// tb_startup: checks the align time, that open-loop steps come at the times
// of constant acceleration, t_n = sqrt(2*n*STEP_ANGLE/ACCEL) samples, the
// hand-over to sensorless mode at VEL_MIN/ACCEL samples, and that run low
// returns to idle. Uses small parameters to keep the run short.
module tb_startup;
  import bldc_pkg::*;
  localparam int ALIGN = 50, ACC = 64, VMIN = 40000, STEP = 1 << 20;
  logic clk = 0, rst_n = 0, sample = 0, run = 0;
  mode_e mode;
  logic step_open;
  int checks = 0, failures = 0;
  int sidx = 0;

  always #5 clk = ~clk;

  startup #(.ALIGN_SAMPLES(ALIGN), .ACCEL(ACC), .VEL_MIN(VMIN), .STEP_ANGLE(STEP)) dut (.*);

  always begin
    @(posedge clk); sample <= 1;
    @(posedge clk); sample <= 0; sidx++;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int t_align, t_ramp, nsteps;
  real t_exp;

  initial begin
    #22 rst_n = 1;
    repeat (10) @(posedge clk);
    chk("idle without run", mode == MODE_IDLE);
    run = 1;
    wait (mode == MODE_ALIGN); t_align = sidx;
    wait (mode == MODE_STEPPING); t_ramp = sidx;
    chk($sformatf("align length %0d", t_ramp - t_align), t_ramp - t_align == ALIGN);
    nsteps = 0;
    while (mode == MODE_STEPPING) begin
      @(posedge clk);
      if (step_open) begin
        nsteps++;
        t_exp = $sqrt(2.0 * nsteps * STEP / ACC);
        chk($sformatf("step %0d at %0d, expected %0.1f", nsteps, sidx - t_ramp, t_exp),
            (sidx - t_ramp) - t_exp < 2.5 && t_exp - (sidx - t_ramp) < 2.5);
      end
    end
    chk($sformatf("hand-over after %0d samples", sidx - t_ramp),
        mode == MODE_SENSORLESS && (sidx - t_ramp) - VMIN / ACC <= 3 && (sidx - t_ramp) >= VMIN / ACC);
    chk("steps taken", nsteps >= 5);
    run = 0;
    repeat (3) @(posedge clk);
    chk("run low: idle", mode == MODE_IDLE);
    run = 1;
    repeat (6) @(posedge clk);
    chk("restart aligns", mode == MODE_ALIGN);
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
