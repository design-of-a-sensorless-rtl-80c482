`timescale 1ns/1ps
// sensorless_ic: sensorless commutation IC for three-phase BLDC motors.
//
// Top level, mixing behavioural models of the analog front end with the
// synthesizable digital circuit (sc_digital):
//   va, vb, vc -> bemf_mux (S1,S0) -> residue_amp (vx - neutral) -> vout
//   vout -> zc_detector -> zcs -> digital phase shifter -> commutation
//   vout -> algo_adc (12 bit, 20 kHz) -> speed estimator -> serial interface
// clk_gen turns the digital circuit's 200 kHz afe_clk into the
// non-overlapping clocks of the residue amplifier. The terminal voltages are
// the scaled-down, low-pass filtered motor terminal voltages (0..VDD).
// Outputs are the six gate drives Ga+..Gc-, FG (toggles at every
// commutation) and the serial DATA pin split into data_in/data_out/data_oe.
// The bias circuit has no model: the common-mode voltage is VDD/2.
module sensorless_ic
  import bldc_pkg::*;
#(
  parameter real         VDD           = 3.3,
  parameter int unsigned CLK_HZ        = 10_000_000,
  parameter int unsigned ALIGN_SAMPLES = 10000,
  parameter int unsigned ACCEL         = 12,
  parameter int unsigned VEL_MIN       = 241592,
  parameter int unsigned LP_K          = 0         // filter lag per rad/s, see phase_comp
) (
  input  logic   clk,
  input  logic   rst_n,
  input  real    va,
  input  real    vb,
  input  real    vc,
  input  logic   sclk,
  input  logic   en,
  input  logic   rw,
  input  logic   data_in,
  output logic   data_out,
  output logic   data_oe,
  input  logic   pwm,
  input  logic   brake,
  output logic   fg,
  output gates_t gates
);
  real        vx, vout, vcm;
  logic       clk1, clk2, clk1a, clk2a, afe_clk, zcs;
  logic       adc_start, adc_valid;
  logic [11:0] adc_data;
  phase_sel_e sel;
  mode_e      mode;
  logic [2:0] step;

  assign vcm = VDD / 2.0;

  bemf_mux u_mux (.va, .vb, .vc, .sel(sel), .vx);

  clk_gen u_clkgen (.clkin(afe_clk), .clk1, .clk2, .clk1a, .clk2a);

  residue_amp u_ramp (.clk1, .clk2, .vx, .va, .vb, .vc, .vcm, .vout);

  zc_detector u_zcd (.vin(vout), .vref(vcm), .zcs);

  algo_adc #(.N(12), .VREF(VDD)) u_adc (
    .clk, .rst_n, .start(adc_start), .vin(vout), .dout(adc_data), .valid(adc_valid)
  );

  sc_digital #(
    .CLK_HZ(CLK_HZ), .ALIGN_SAMPLES(ALIGN_SAMPLES), .ACCEL(ACCEL), .VEL_MIN(VEL_MIN),
    .LP_K(LP_K)
  ) u_dig (
    .clk, .rst_n, .sclk, .en, .rw, .data_in, .data_out, .data_oe,
    .pwm, .brake, .fg, .gates,
    .zcs, .adc_data, .adc_valid, .adc_start, .sel, .afe_clk,
    .mode, .step
  );

endmodule
