`timescale 1ns/1ps
// tb_speed_est: feeds the speed estimator a concatenated non-excited phase
// back-EMF (a triangle between -e_p and +e_p, one ramp per commutation
// interval Tc) as A/D samples, with commutation pulses every Tc. The motor
// constant is 2 A/D counts per rad/s, so e_p = 2*omega. Checks the
// interval-based estimate floor(KW/Tc), the filtered speed output against
// omega = 2*pi/(3*P*Tc) in both directions, that corrupted samples inside
// the diode-conduction mask do not disturb it, and that the interval-based
// estimate takes over when Tc is shorter than a speed sample.
// Time bases: ps_tick every 4 clocks, spd_tick every 40 clocks (the same
// 10:1 ratio as 200 kHz : 20 kHz).
module tb_speed_est;
  logic clk = 0, rst_n = 0;
  logic ps_tick = 0, spd_tick = 0, adc_valid = 0, comm = 0, mask = 0;
  logic [11:0] adc_data = 12'd2048;
  logic [2:0] step = 0;
  logic signed [11:0] speed;
  logic [11:0] w_tilde, w_hat;
  logic use_tilde, dir_neg;
  int checks = 0, failures = 0;
  int cyc = 0;

  localparam real PI = 3.14159265358979;
  localparam int  KW = 34906;            // 2*pi*200000/(3*12)

  always #5 clk = ~clk;

  speed_est dut (.*);

  // tick generation and waveform
  int  tc_ps = 200;       // commutation interval in ps ticks
  int  dir = 1;
  int  ps_in_int = 0;     // ps ticks since last commutation
  int  nint = 0;          // interval index
  bit  corrupt = 0;
  real ep;

  always @(posedge clk) begin
    cyc++;
    ps_tick  <= (cyc % 4 == 0);
    spd_tick <= (cyc % 40 == 0);
    comm <= 0;
    adc_valid <= 0;
    if (ps_tick) begin
      ps_in_int++;
      if (ps_in_int >= tc_ps) begin
        ps_in_int = 0;
        nint++;
        comm <= 1;
        step <= (dir > 0) ? ((step == 5) ? 0 : step + 1) : ((step == 0) ? 5 : step - 1);
      end
    end
    mask <= (ps_in_int < 4);
    if (spd_tick) begin
      real e, frac;
      frac = real'(ps_in_int) / real'(tc_ps);
      e = (nint % 2 == 0) ? (-ep + 2.0 * ep * frac) : (ep - 2.0 * ep * frac);
      adc_valid <= 1;
      if (corrupt && ps_in_int < 4) adc_data <= 12'd4000;
      else adc_data <= 12'($rtoi(2048.0 + e + 0.5));
    end
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_speed(input int t, input int d, input bit bad);
    real w;
    tc_ps = t; dir = d; corrupt = bad;
    w = 2.0 * PI * 200000.0 / (3.0 * 12.0 * real'(t));
    ep = 2.0 * w;
    repeat (60 * t * 4) @(posedge clk);     // 60 commutations
    chk($sformatf("w_tilde %0d for Tc=%0d", w_tilde, t), w_tilde == 12'(KW / t));
    chk("slope path used", !use_tilde);
    for (int i = 0; i < 5; i++) begin
      repeat (t * 4 * 3 / 2) @(posedge clk);
      chk($sformatf("speed %0d expected %0.1f (Tc=%0d)", speed, d * w, t),
          (real'(speed) - d * w < 0.06 * w) && (d * w - real'(speed) < 0.06 * w));
    end
    chk("direction flag", dir_neg == (d < 0));
  endtask

  initial begin
    ep = 0;
    #22 rst_n = 1;
    run_speed(200, 1, 0);
    run_speed(100, 1, 0);
    run_speed(400, 1, 1);    // corrupted samples inside the mask
    run_speed(150, -1, 0);   // reverse rotation
    // very fast: commutation interval (8 ps ticks) shorter than a speed sample
    tc_ps = 8; dir = 1; corrupt = 0; ep = 0;
    repeat (8000) @(posedge clk);
    chk("interval estimate selected", use_tilde);
    chk($sformatf("w_tilde %0d", w_tilde), w_tilde == 12'(KW / 8 > 4095 ? 4095 : KW / 8));
    chk("speed saturates", speed == 12'sd2047);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
