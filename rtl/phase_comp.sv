`timescale 1ns/1ps
// phase_comp: phase compensation circuit.
//
// The digital phase shifter produces a 30 degree shift when its counters
// count down twice as fast as they count up. Advancing the commutation by
// dtheta degrees needs the down-count increment
//     gamma_d = 60 / (30 - dtheta) * gamma_i .
// dtheta is held in 0.1 degree units, so the circuit evaluates
//     gamma_d = round(600 * gamma_i / (300 - dtheta))
// with one constant multiplication and a sequential divider. The result is
// recomputed whenever gamma_i or dtheta changes (about 26 clocks); the old
// gamma_d stays on the output until the new one is ready. dtheta is clamped
// to -300..299 (the table's range, minus the pole at +300), and gamma_d
// saturates at 16 bits.
//
// The phase lag theta_LP of the external low-pass filters on the terminal
// voltages is added to dtheta. It grows with speed; for a first-order
// filter of time constant tau it is close to omega_e*tau for small angles,
// so it is taken as |speed| * LP_K / 2^12 (0.1 degree), with the estimated
// mechanical speed in rad/s and LP_K = 2^12 * 1800/pi * (P/2) * tau. The
// sum is what is clamped, and gamma_d is recomputed whenever it changes.
//
// The formula, including the speed-dependent filter lag, is the document's.
// The linear model of the lag, LP_K (0 by default: the filter is outside the
// chip and its time constant is the board's), the divider and the rounding
// are this design's choices.
module phase_comp
  import bldc_pkg::*;
#(
  parameter int unsigned GD_W = 16,
  parameter int unsigned LP_K = 0     // filter lag, 0.1 degree per rad/s, Q12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [REG_W-1:0] gi,
  input  logic signed [REG_W-1:0] dtheta,   // 0.1 degree
  input  logic signed [REG_W-1:0] speed,    // estimated speed, rad/s
  output logic        [GD_W-1:0]  gd,
  output logic                    busy
);
  localparam int unsigned NW = 24;
  localparam int unsigned DW = 10;

  logic        [REG_W-1:0] gi_last;
  logic signed [REG_W:0]   th_last;
  logic        [REG_W-1:0] spd_abs;
  logic        [REG_W+27:0] lag_full;
  logic signed [REG_W+1:0] th_sum;
  logic                    dirty, start, dv_busy, dv_done;
  logic signed [REG_W:0]   th_c;
  logic        [DW-1:0]    den;
  logic        [NW-1:0]    num, quot;

  // add the filter lag, clamp, and form the divisor 300 - angle (1..600)
  always_comb begin
    spd_abs  = speed[REG_W-1] ? REG_W'(-speed) : REG_W'(speed);
    lag_full = (($bits(lag_full))'(spd_abs) * ($bits(lag_full))'(LP_K)) >> 12;
    th_sum   = (lag_full > 40'd600) ? 14'sd600 : $signed({1'b0, 13'(lag_full)});
    th_sum   = th_sum + 14'(dtheta);
    if (th_sum < -14'sd300)      th_c = -13'sd300;
    else if (th_sum > 14'sd299)  th_c = 13'sd299;
    else                         th_c = 13'(th_sum);
    den = DW'(13'sd300 - th_c);
    num = NW'(600 * int'(gi)) + NW'(den >> 1);   // rounded quotient
  end

  assign start = dirty & ~dv_busy & ~dv_done;

  seq_divider #(.NW(NW), .DW(DW)) u_div (
    .clk, .rst_n, .start, .num, .den,
    .busy(dv_busy), .done(dv_done), .quot
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gi_last <= GI_RST;
      th_last <= 13'(DTHETA_RST);
      dirty   <= 1'b1;
      gd      <= GD_W'(2 * GI_RST);
    end else begin
      if (gi != gi_last || th_c != th_last) begin
        gi_last <= gi;
        th_last <= th_c;
        dirty   <= 1'b1;
      end else if (start) begin
        dirty <= 1'b0;
      end
      if (dv_done)
        gd <= (quot > NW'({GD_W{1'b1}})) ? '1 : GD_W'(quot);
    end
  end

  assign busy = dirty | dv_busy;

endmodule
