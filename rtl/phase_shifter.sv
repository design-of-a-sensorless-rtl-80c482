`timescale 1ns/1ps
// phase_shifter: simplified frequency-independent digital phase shifter.
//
// Two saturating up/down counters cp and cn watch the zero-crossing signal z
// at every sample tick (200 kHz by default):
//   z = 1: cp += gamma_i, cn -= gamma_d
//   z = 0: cn += gamma_i, cp -= gamma_d
// and both are clamped to 0..L. cp thus measures how long z stayed high and,
// after z falls, runs back to zero in gamma_i/gamma_d of that time. With
// gamma_d = 2*gamma_i and z toggling every 60 electrical degrees this puts
// the commutation 30 degrees after each zero crossing, whatever the speed.
// When a counter would go below zero it is reset to zero and a commutation
// pulse (comm, one clock, with comm_p telling which counter fired) is given to
// the output control logic. A counter already at zero only stops there.
//
// While mask is high (free-wheeling diode conduction after a commutation)
// the counters see the value z had before the mask rose instead of z.
//
// Counter structure, widths (16 bit), reset-to-zero and the stop behaviour
// are the document's; L defaults to the full 16-bit range (the document
// names L but gives no value) and the mask hold is this design's way of
// applying the delay circuit's mask.
module phase_shifter
  import bldc_pkg::*;
#(
  parameter int unsigned            W = CNT_W,
  parameter logic [CNT_W-1:0]       L = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample,    // sampling tick
  input  logic         z,         // zero-crossing signal
  input  logic         mask,      // hold z during diode conduction
  input  logic [W-1:0] gi,        // up-count increment gamma_i
  input  logic [W-1:0] gd,        // down-count increment gamma_d
  output logic [W-1:0] cp,
  output logic [W-1:0] cn,
  output logic         comm,      // commutation pulse
  output logic         comm_p     // 1: fired by cp, 0: fired by cn
);
  logic          z_hold, z_eff;
  logic [W+1:0]  sp, sn;          // signed sums, two guard bits
  logic [W-1:0]  cp_nx, cn_nx;
  logic          fire_p, fire_n;

  assign z_eff = mask ? z_hold : z;

  function automatic logic [W+1:0] step_sum(input logic [W-1:0] c,
                                            input logic up,
                                            input logic [W-1:0] inc,
                                            input logic [W-1:0] dec);
    return up ? ({2'b00, c} + {2'b00, inc}) : ({2'b00, c} - {2'b00, dec});
  endfunction

  function automatic logic [W-1:0] clamp(input logic [W+1:0] s);
    if (s[W+1])                      return '0;   // below zero
    else if (s[W:0] > {1'b0, W'(L)}) return W'(L);
    else                             return s[W-1:0];
  endfunction

  always_comb begin
    sp     = step_sum(cp, z_eff, gi, gd);
    sn     = step_sum(cn, ~z_eff, gi, gd);
    cp_nx  = clamp(sp);
    cn_nx  = clamp(sn);
    fire_p = (cp != '0) && (sp[W+1] || sp == '0);
    fire_n = (cn != '0) && (sn[W+1] || sn == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp     <= '0;
      cn     <= '0;
      z_hold <= 1'b0;
      comm   <= 1'b0;
      comm_p <= 1'b0;
    end else begin
      comm <= 1'b0;
      if (!mask) z_hold <= z;
      if (sample) begin
        cp <= cp_nx;
        cn <= cn_nx;
        if (fire_p || fire_n) begin
          comm   <= 1'b1;
          comm_p <= fire_p;
        end
      end
    end
  end

endmodule
