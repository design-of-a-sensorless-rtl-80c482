`timescale 1ns/1ps
// bemf_mux: analog multiplexer of the back-EMF sensing circuit.
// Behavioural model (the real part is an analog switch network): it passes
// the terminal voltage of the non-excited phase, chosen by S1,S0, to the
// residue amplifier input vx. Code 11 is unused and selects phase c.
// Selecting the non-excited phase with S1,S0 follows the document; the code
// assignment is this design's.
module bemf_mux (
  input  real        va,
  input  real        vb,
  input  real        vc,
  input  logic [1:0] sel,   // {S1,S0}
  output real        vx
);
  always_comb begin
    unique case (sel)
      2'b00:   vx = va;
      2'b01:   vx = vb;
      default: vx = vc;
    endcase
  end
endmodule
