`timescale 1ns/1ps
// residue_amp: switched-capacitor residue amplifier (back-EMF estimator).
// Behavioural model of an analog circuit: it reproduces the charge
// equations, not the transistors.
//
// Reset phase (clk1 high): the opamp offset voff is stored on C1a, C1b, C1c
// and the difference vx - voff on C2. Output phase (clk2 high): the input
// capacitors are switched to va, vb, vc and the charge moved onto C2 gives
//   vout = voff + (vx - voff) - (C1a*va + C1b*vb + C1c*vc)/C2
// which, with C1a = C1b = C1c = C2/3, is vx - (va+vb+vc)/3: the non-excited
// phase voltage minus the simulated neutral voltage, so the opamp offset
// drops out. The result is referred to the common-mode voltage vcm (half the
// supply), so zero back-EMF gives vcm. Between output phases vout holds, as
// the deglitching capacitors do. vx is sampled on the falling edge of clk1
// and vout is updated on the rising edge of clk2.
//
// The two phases, the charge equations and the offset cancellation follow
// the document; the capacitor ratios come from its simplified result, and
// referring the output to vcm is this design's reading of its common-mode
// remark.
module residue_amp #(
  parameter real C2    = 3.0,
  parameter real C1A   = 1.0,
  parameter real C1B   = 1.0,
  parameter real C1C   = 1.0,
  parameter real VOFF  = 0.005     // opamp input offset, volts
) (
  input  logic clk1,
  input  logic clk2,
  input  real  vx,
  input  real  va,
  input  real  vb,
  input  real  vc,
  input  real  vcm,
  output real  vout
);
  real q_c2;   // charge on C2 after the reset phase, per unit C2

  initial begin
    q_c2 = 0.0;
    vout = 0.0;
  end

  always @(negedge clk1) q_c2 <= vx - VOFF;

  always @(posedge clk2)
    vout <= vcm + VOFF + q_c2 - (C1A * va + C1B * vb + C1C * vc) / C2;

endmodule
