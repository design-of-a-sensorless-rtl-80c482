`timescale 1ns/1ps
// tb_phase_comp: checks gamma_d = 60/(30 - theta_LP - dtheta) * gamma_i,
// rounded, against real arithmetic in the testbench.
//
// Two instances share the inputs: dut has the default LP_K = 0 (no filter
// lag), dut_lp has LP_K = 2048, i.e. 0.5 tenth-degree of lag per rad/s of
// estimated speed. The cases cover the 30 degree default, advance and
// retard, a 0.8 degree step, the range ends, saturation of gamma_d, the lag
// for both speed signs, clamping of the summed angle, and random values.
// Each result must be within 1 of the reference and ready within 30 clocks
// of the input change.
module tb_phase_comp;
  logic clk = 0, rst_n = 0;
  logic [11:0] gi;
  logic signed [11:0] dtheta, speed;
  logic [15:0] gd, gd_lp;
  logic busy, busy_lp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_comp dut (.clk, .rst_n, .gi, .dtheta, .speed, .gd, .busy);
  phase_comp #(.LP_K(2048)) dut_lp (.clk, .rst_n, .gi, .dtheta, .speed, .gd(gd_lp), .busy(busy_lp));

  function automatic int expect_gd(input int g, input real th);
    real r;
    if (th < -300.0) th = -300.0;
    if (th > 299.0)  th = 299.0;
    r = 60.0 / (30.0 - th / 10.0) * real'(g);
    return (r > 65535.0) ? 65535 : $rtoi(r + 0.5);
  endfunction

  task automatic chk_gd(input string name, input int got, input int exp_i, input int g, input int th, input int sp);
    checks++;
    if (got - exp_i > 1 || exp_i - got > 1) begin
      failures++;
      $display("FAIL %s gi=%0d dtheta=%0d speed=%0d: gd=%0d expected %0d", name, g, th, sp, got, exp_i);
    end
  endtask

  task automatic run(input int g, input int th, input int sp);
    int cyc, lag;
    gi = 12'(g); dtheta = 12'(th); speed = 12'(sp);
    @(posedge clk);
    cyc = 0;
    @(posedge clk);
    while (busy || busy_lp) begin @(posedge clk); cyc++; end
    @(posedge clk);
    lag = ((sp < 0 ? -sp : sp) * 2048) / 4096;
    if (lag > 600) lag = 600;
    chk_gd("no lag", int'(gd), expect_gd(g, real'(th)), g, th, sp);
    chk_gd("with lag", int'(gd_lp), expect_gd(g, real'(th + lag)), g, th, sp);
    checks++;
    if (cyc > 30) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    gi = 12'd20; dtheta = 0; speed = 0;
    #22 rst_n = 1;
    repeat (40) @(posedge clk);
    checks++; if (gd != 16'd40) begin failures++; $display("FAIL reset gd %0d", gd); end
    run(20, 0, 0);       // 40: 30 degree shift
    run(20, 100, 0);     // 10 degree advance: 60
    run(20, -100, 0);    // 10 degree retard: 30
    run(20, 8, 0);       // 0.8 degree step: 41
    run(1000, 150, 0);
    run(4095, -300, 0);
    run(4095, 299, 0);   // saturates
    run(7, 250, 0);
    run(20, 0, 100);     // 5 degree lag: 48 with LP_K
    run(20, 0, -100);    // lag independent of direction
    run(20, 100, 200);   // 10 + 10 degrees: 120
    run(20, -300, 2047); // lag clipped at 60 degrees, sum 30 degrees
    run(20, 250, 400);   // sum clamped at 29.9 degrees
    for (int i = 0; i < 20; i++)
      run($urandom_range(4095), $urandom_range(590) - 300, $urandom_range(1000) - 500);
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
