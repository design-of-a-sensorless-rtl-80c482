`timescale 1ns/1ps
// iir2: second-order low-pass IIR filter (direct form I, fixed point).
//
//   y[n] = B0*x[n] + B1*x[n-1] + B2*x[n-2] - A1*y[n-1] - A2*y[n-2]
//
// Coefficients are in Q16. The defaults are a Butterworth low-pass with a
// 500 Hz corner sampled at 20 kHz, from the bilinear transform:
//   K = tan(pi*500/20000), n = 1/(1 + sqrt(2)*K + K^2),
//   B0 = B2 = K^2*n, B1 = 2*B0, A1 = 2*(K^2-1)*n, A2 = (1 - sqrt(2)*K + K^2)*n,
// each multiplied by 2^16 and rounded. The state keeps FRAC extra fraction
// bits to limit rounding limit cycles. One new sample per en pulse; y is
// registered and valid from the clock after en.
module iir2 #(
  parameter int unsigned XW   = 13,
  parameter int unsigned FRAC = 6,
  parameter int          B0   = 363,
  parameter int          B1   = 726,
  parameter int          B2   = 363,
  parameter int          A1   = -116564,
  parameter int          A2   = 52481
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  output logic signed [XW-1:0] y
);
  localparam int unsigned SW = XW + FRAC + 2;   // state width
  localparam int unsigned AW = SW + 20;         // accumulator width

  logic signed [SW-1:0] x0, x1, x2, y1, y2, ynew;
  logic signed [AW-1:0] acc;
  logic signed [SW-1:0] ysat_lo, ysat_hi;

  assign x0 = SW'(x) <<< FRAC;
  assign ysat_hi = SW'({1'b0, {(XW-1){1'b1}}}) <<< FRAC;
  assign ysat_lo = -ysat_hi;

  always_comb begin
    acc = AW'(B0) * AW'(x0) + AW'(B1) * AW'(x1) + AW'(B2) * AW'(x2)
        - AW'(A1) * AW'(y1) - AW'(A2) * AW'(y2);
    acc = acc + AW'(1 <<< 15);                 // round
    acc = acc >>> 16;
    if (acc > AW'(ysat_hi))      ynew = ysat_hi;
    else if (acc < AW'(ysat_lo)) ynew = ysat_lo;
    else                         ynew = SW'(acc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
    end else if (en) begin
      x1 <= x0; x2 <= x1;
      y1 <= ynew; y2 <= y1;
    end
  end

  assign y = XW'(y1 >>> FRAC);

endmodule
