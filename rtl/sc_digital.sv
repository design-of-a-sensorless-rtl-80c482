`timescale 1ns/1ps
// sc_digital: digital circuit of the sensorless commutation IC.
//
// Wires the serial interface, phase compensation, digital phase shifter,
// delay circuit, commutation control, start-up circuit and speed estimator
// together, and derives their time bases from the system clock:
//   us_tick  1 MHz   delay circuit (Dth is in microseconds)
//   ps_tick  200 kHz phase shifter and start-up circuit
//   spd_tick 20 kHz  A/D conversion start and speed estimation
//   afe_clk  200 kHz square wave for the analog clock generator
// The zero-crossing input is asynchronous and is synchronised with two
// flip-flops. Commutation steps come from the start-up circuit until it
// reaches its hand-over speed, then from the phase shifter. Each change of
// step starts the delay circuit, which later switches sel (S1,S0), and is
// timed by the speed estimator.
//
// The block split and the 200 kHz / 20 kHz rates are the document's; the
// 10 MHz system clock is this design's assumption (the document does not
// give the oscillator frequency) and all dividers follow from CLK_HZ.
module sc_digital
  import bldc_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 10_000_000,
  parameter int unsigned PS_HZ         = 200_000,
  parameter int unsigned SPD_HZ        = 20_000,
  parameter int unsigned POLES         = 12,
  parameter int unsigned ALIGN_SAMPLES = 10000,
  parameter int unsigned ACCEL         = 12,
  parameter int unsigned VEL_MIN       = 241592,
  parameter int unsigned LP_K          = 0        // filter lag per rad/s, see phase_comp
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // serial interface
  input  logic                    sclk,
  input  logic                    en,
  input  logic                    rw,
  input  logic                    data_in,
  output logic                    data_out,
  output logic                    data_oe,
  // motor side
  input  logic                    pwm,
  input  logic                    brake,
  output logic                    fg,
  output gates_t                  gates,
  // analog front end
  input  logic                    zcs,
  input  logic             [11:0] adc_data,
  input  logic                    adc_valid,
  output logic                    adc_start,
  output phase_sel_e              sel,
  output logic                    afe_clk,
  // status
  output mode_e                   mode,
  output logic [2:0]              step
);
  logic us_tick, ps_tick, spd_tick, half_tick;

  tick_gen #(.DIV(CLK_HZ / 1_000_000)) u_us  (.clk, .rst_n, .tick(us_tick));
  tick_gen #(.DIV(CLK_HZ / PS_HZ))     u_ps  (.clk, .rst_n, .tick(ps_tick));
  tick_gen #(.DIV(CLK_HZ / SPD_HZ))    u_spd (.clk, .rst_n, .tick(spd_tick));
  tick_gen #(.DIV(CLK_HZ / PS_HZ / 2)) u_afe (.clk, .rst_n, .tick(half_tick));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) afe_clk <= 1'b0;
    else if (half_tick) afe_clk <= ~afe_clk;
  end

  assign adc_start = spd_tick;

  logic [1:0] zcs_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) zcs_s <= '0;
    else        zcs_s <= {zcs_s[0], zcs};
  end

  logic signed [REG_W-1:0] dth, dtheta, speed;
  logic        [REG_W-1:0] gi;
  logic                    wr_strobe;

  serial_if u_serial (
    .clk, .rst_n, .sclk, .en, .rw, .data_in, .data_out, .data_oe,
    .dth, .gi, .dtheta, .speed, .wr_strobe
  );

  logic [CNT_W-1:0] gd, cp, cn;
  logic             pc_busy;

  phase_comp #(.LP_K(LP_K)) u_pcomp (.clk, .rst_n, .gi, .dtheta, .speed, .gd, .busy(pc_busy));

  logic mask, comm_ps, comm_p;

  phase_shifter u_shift (
    .clk, .rst_n, .sample(ps_tick), .z(zcs_s[1]), .mask,
    .gi(CNT_W'(gi)), .gd, .cp, .cn, .comm(comm_ps), .comm_p
  );

  logic step_open;

  startup #(
    .ALIGN_SAMPLES(ALIGN_SAMPLES), .ACCEL(ACCEL), .VEL_MIN(VEL_MIN)
  ) u_start (
    .clk, .rst_n, .sample(ps_tick), .run(~brake), .mode, .step_open
  );

  phase_sel_e next_sel;
  logic [2:0] hall;
  logic       advanced;

  commutation_ctrl u_comm (
    .clk, .rst_n, .mode, .step_open, .comm(comm_ps), .pwm, .brake,
    .step, .gates, .next_sel, .hall, .fg, .advanced
  );

  logic             select;
  logic [REG_W-1:0] dcount;

  delay_circuit u_delay (
    .clk, .rst_n, .us_tick, .comm(advanced), .next_sel, .dth,
    .sel, .mask, .select, .count(dcount)
  );

  logic [REG_W-1:0] w_tilde, w_hat;
  logic             use_tilde, dir_neg;

  speed_est #(.POLES(POLES), .PS_HZ(PS_HZ), .SPD_HZ(SPD_HZ)) u_speed (
    .clk, .rst_n, .ps_tick, .spd_tick, .adc_data, .adc_valid,
    .comm(advanced), .step, .mask, .speed, .w_tilde, .w_hat,
    .use_tilde, .dir_neg
  );

endmodule
