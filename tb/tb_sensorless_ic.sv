`timescale 1ns/1ps
// tb_sensorless_ic: end-to-end test of the commutation IC at its default
// parameters (10 MHz clock), driving a model of a 12-pole BLDC motor.
//
// Motor model (updated every microsecond): electrical angle phi, trapezoidal
// back-EMFs e_a, e_b, e_c (120 degree flat tops, zero crossings of e_a at 0
// and 180 degrees) of amplitude KE_V * omega_mech. The terminal voltages are
// those after the external sensing divider: a phase whose upper switch is on
// sits at VDC, one whose lower switch is on at 0, and an open phase at
// e + VDC/2. For DIODE_US after every commutation the phase just switched
// off is clamped to a rail (free-wheeling diode conduction). The rotor is
// held aligned while the IC aligns, follows the IC's constant-acceleration
// stepping profile while it steps, then accelerates on its own to 1000 rpm.
//
// Sequence and checks: read the reset values and program Dth over the serial
// port; release Brake; check align, stepping and hand-over; after hand-over
// measure each commutation's angle against the ideal one (30 degrees after
// the zero crossing), within 5 degrees from 10 ms after hand-over through
// the ramp to 1000 rpm and at steady speed; read the estimated speed; program a 10 degree phase
// advance and check the commutations move; finally check PWM chopping and
// Brake. Each mechanism is counted and one that never happened is a failure.
module tb_sensorless_ic;
  import bldc_pkg::*;

  localparam real VDC  = 2.0;        // sensed dc link, volts
  localparam real KE_V = 0.002417;   // sensed volts per mechanical rad/s
  localparam real DIODE_US = 40.0;
  localparam real ACC_OWN = 432000.0;  // deg/s^2 electrical after hand-over
  localparam real W_TOP   = 36000.0;   // 1000 rpm, electrical deg/s
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  real  va, vb, vc;
  logic sclk = 0, en = 1, rw = 0, data_in = 0, data_out, data_oe;
  logic pwm = 1, brake = 1, fg;
  gates_t gates;

  int checks = 0, failures = 0;

  always #50 clk = ~clk;

  sensorless_ic dut (.*);

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- serial
  int n_wr = 0, n_rd = 0;
  task automatic xfer(input logic read, input logic [1:0] addr, input logic [11:0] wdata,
                      output logic [11:0] rdata);
    logic [13:0] frame;
    frame = {addr, wdata};
    rdata = '0;
    rw = read;
    #2000 en = 0;
    #2000;
    for (int i = 0; i < 14; i++) begin
      data_in = frame[13 - i];
      #1000 sclk = 1;
      if (read && i >= 2) rdata = {rdata[10:0], data_out};
      #1000 sclk = 0;
    end
    #2000 en = 1;
    #4000;
    if (read) n_rd++; else n_wr++;
  endtask

  // ----------------------------------------------------------------- motor
  real phi = 30.0, w_e = 0.0;       // electrical degrees, degrees/s
  realtime t_step0;
  mode_e mode_seen;
  int  clamp_phase = -1;
  real clamp_v;
  real clamp_left = 0.0;
  gates_t g_prev;
  int  n_clamp_masked = 0, n_clamp = 0;

  function automatic real trap(input real x);
    real y;
    y = x - 360.0 * $floor(x / 360.0);
    if (y < 30.0)       return y / 30.0;
    else if (y < 150.0) return 1.0;
    else if (y < 210.0) return (180.0 - y) / 30.0;
    else if (y < 330.0) return -1.0;
    else                return (y - 360.0) / 30.0;
  endfunction

  function automatic real term(input logic up, input logic dn, input real e, input int ph);
    if (ph == clamp_phase && clamp_left > 0.0) return clamp_v;
    if (up) return VDC;
    if (dn) return 0.0;
    return e + VDC / 2.0;
  endfunction

  always #1000 begin
    real e, wm, n;
    mode_seen = dut.u_dig.mode;
    case (mode_seen)
      MODE_IDLE, MODE_ALIGN: begin
        phi = 30.0; w_e = 0.0; t_step0 = $realtime;
      end
      MODE_STEPPING: begin
        n   = ($realtime - t_step0) / 5000.0;      // 200 kHz samples
        phi = 30.0 + 60.0 * (12.0 * n * n / 2.0) / 268435456.0;
        w_e = 60.0 * 12.0 * n / 268435456.0 * 200000.0;
      end
      default: begin
        phi += w_e * 1e-6;
        if (w_e < W_TOP) w_e += ACC_OWN * 1e-6;
      end
    endcase
    // diode clamping of the phase that has just been switched off
    if (gates != g_prev && mode_seen != MODE_IDLE && !brake && g_prev != 6'b01_01_01) begin
      if ((g_prev.ap || g_prev.an) && !gates.ap && !gates.an) begin
        clamp_phase = 0; clamp_v = g_prev.an ? VDC : 0.0;
      end else if ((g_prev.bp || g_prev.bn) && !gates.bp && !gates.bn) begin
        clamp_phase = 1; clamp_v = g_prev.bn ? VDC : 0.0;
      end else if ((g_prev.cp || g_prev.cn) && !gates.cp && !gates.cn) begin
        clamp_phase = 2; clamp_v = g_prev.cn ? VDC : 0.0;
      end
      if (pwm) begin
        clamp_left = DIODE_US;
        n_clamp++;
      end
    end
    g_prev = gates;
    if (clamp_left > 0.0) begin
      clamp_left -= 1.0;
      if (clamp_left == DIODE_US / 2.0) begin
        if (dut.u_dig.mask) n_clamp_masked++;
        else $display("unmasked clamp at %0t mode %0d", $realtime, dut.u_dig.mode);
      end
    end
    wm = w_e / 6.0 * PI / 180.0;
    e  = KE_V * wm;
    va = term(gates.ap, gates.an, e * trap(phi), 0);
    vb = term(gates.bp, gates.bn, e * trap(phi - 120.0), 1);
    vc = term(gates.cp, gates.cn, e * trap(phi - 240.0), 2);
  end

  // ---------------------------------------------- commutation angle errors
  int  n_steps_open = 0, n_comm_ss = 0;
  real err_sum = 0.0, err_max = 0.0;
  int  err_n = 0;
  bit  measure = 0;
  real tol = 5.0;
  logic fg_d = 0;

  always @(posedge clk) begin
    fg_d <= fg;
    if (fg != fg_d && rst_n) begin
      if (dut.u_dig.mode == MODE_STEPPING) n_steps_open++;
      if (dut.u_dig.mode == MODE_SENSORLESS) begin
        real err;
        n_comm_ss++;
        err = (phi - 30.0) - 60.0 * $floor((phi - 30.0) / 60.0);   // 0..60
        if (err >= 30.0) err -= 60.0;
        if (measure) begin
          err_sum += err; err_n++;
          if ((err < 0 ? -err : err) > (err_max < 0 ? -err_max : err_max)) err_max = err;
          chk($sformatf("commutation angle error %0.2f deg at %0.0f rpm", err, w_e / 36.0),
              (err < 0 ? -err : err) < tol);
        end
      end
    end
  end

  // ------------------------------------------------------------ sequence
  logic [11:0] r;
  realtime t_al, t_st, t_ss;
  int n_align = 0, n_handover = 0, n_speed = 0, n_adv = 0, n_brake = 0, n_pwm = 0;
  real mean0, mean1;

  initial begin
    va = 1.0; vb = 1.0; vc = 1.0;
    #1000 rst_n = 1;
    #5000;
    xfer(1, 2'b00, 0, r); chk("Dth reset value", r == 12'd10);
    xfer(1, 2'b01, 0, r); chk("gamma_i reset value", r == 12'd20);
    xfer(1, 2'b10, 0, r); chk("dtheta reset value", r == 12'd0);
    xfer(0, 2'b00, 12'd100, r);
    xfer(1, 2'b00, 0, r); chk("Dth programmed", r == 12'd100);
    chk("idle while braking", dut.u_dig.mode == MODE_IDLE);
    brake = 0;
    wait (dut.u_dig.mode == MODE_ALIGN); t_al = $realtime; n_align++;
    wait (dut.u_dig.mode == MODE_STEPPING); t_st = $realtime;
    chk($sformatf("align time %0.2f ms", (t_st - t_al) / 1e6),
        (t_st - t_al) / 1e6 > 49.9 && (t_st - t_al) / 1e6 < 50.1);
    wait (dut.u_dig.mode == MODE_SENSORLESS); t_ss = $realtime; n_handover++;
    chk($sformatf("ramp time %0.2f ms", (t_ss - t_st) / 1e6),
        (t_ss - t_st) / 1e6 > 99.0 && (t_ss - t_st) / 1e6 < 102.0);
    chk($sformatf("open-loop steps %0d", n_steps_open), n_steps_open >= 8 && n_steps_open <= 10);
    // let the phase shifter settle, then measure while accelerating
    #10ms;
    tol = 5.0; measure = 1;
    wait (w_e >= W_TOP);
    #10ms;
    tol = 5.0;
    err_sum = 0; err_n = 0;
    #20ms;
    mean0 = err_sum / err_n;
    $display("steady 1000 rpm: %0d commutations, mean error %0.2f deg, worst %0.2f deg",
             err_n, mean0, err_max);
    xfer(1, 2'b11, 0, r);
    n_speed++;
    $display("estimated speed %0d rad/s, true %0.1f", $signed(r), W_TOP / 6.0 * PI / 180.0);
    chk($sformatf("estimated speed %0d rad/s, true %0.1f", $signed(r), W_TOP / 6.0 * PI / 180.0),
        $signed(r) > 99 && $signed(r) < 110);
    // 10 degree phase advance: commutations come 10 degrees earlier
    measure = 0;
    xfer(0, 2'b10, 12'd100, r);
    #10ms;
    err_sum = 0; err_n = 0; measure = 1; tol = 15.0;
    #20ms;
    mean1 = err_sum / err_n;
    n_adv++;
    $display("with 10 degree advance: mean error %0.2f deg", mean1);
    chk($sformatf("phase advance moved commutation by %0.2f deg", mean1 - mean0),
        mean1 - mean0 < -8.0 && mean1 - mean0 > -12.0);
    measure = 0;
    // PWM chops the upper switches
    @(posedge clk); pwm = 0; @(posedge clk); #1;
    chk("pwm low: no upper switch on", !gates.ap && !gates.bp && !gates.cp);
    chk("pwm low: lower switch still on", gates.an || gates.bn || gates.cn);
    n_pwm++;
    pwm = 1;
    // Brake
    brake = 1; #1;
    chk("brake gates", gates == 6'b01_01_01);
    #10us;
    chk("brake returns to idle", dut.u_dig.mode == MODE_IDLE);
    n_brake++;
    // mechanism counts
    chk($sformatf("serial writes %0d", n_wr), n_wr > 0);
    chk($sformatf("serial reads %0d", n_rd), n_rd > 0);
    chk("align happened", n_align > 0);
    chk("open-loop stepping happened", n_steps_open > 0);
    chk("hand-over happened", n_handover > 0);
    chk($sformatf("sensorless commutations %0d", n_comm_ss), n_comm_ss > 50);
    chk($sformatf("diode clamps %0d, masked %0d", n_clamp, n_clamp_masked),
        n_clamp > 0 && n_clamp_masked == n_clamp);
    chk("speed read", n_speed > 0);
    chk("phase advance applied", n_adv > 0);
    chk("pwm chop", n_pwm > 0);
    chk("brake", n_brake > 0);
    $display("mechanisms: align %0d, open-loop steps %0d, hand-over %0d, sensorless commutations %0d, diode clamps masked %0d/%0d, serial wr %0d rd %0d, speed reads %0d, advance %0d, pwm %0d, brake %0d",
             n_align, n_steps_open, n_handover, n_comm_ss, n_clamp_masked, n_clamp, n_wr, n_rd,
             n_speed, n_adv, n_pwm, n_brake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
