`timescale 1ns/1ps
// clk_gen: non-overlapping clock generator for the residue amplifier.
// Behavioural model with delays. From one input clock it makes two
// non-overlapping phases clk1 (while clkin is high) and clk2 (while clkin
// is low), plus the phase-advanced clk1a and clk2a, which switch TD2 before
// clk1 and clk2. A phase turns on only TD1 after the other advanced phase
// has turned off, which gives the non-overlap gap.
// The four clocks and their roles follow the document; the delay values are
// this design's.
module clk_gen #(
  parameter realtime TD1 = 5ns,   // non-overlap gap
  parameter realtime TD2 = 5ns    // advance of clk1a/clk2a
) (
  input  logic clkin,
  output logic clk1,
  output logic clk2,
  output logic clk1a,
  output logic clk2a
);
  // one process walks through the edge sequence of each half period; the
  // input half period must be longer than 2*TD2 + TD1
  always @(clkin) begin
    if (clkin) begin
      clk2a = 1'b0;
      #(TD2) clk2 = 1'b0;
      #(TD1) clk1a = 1'b1;
      #(TD2) clk1 = 1'b1;
    end else begin
      clk1a = 1'b0;
      #(TD2) clk1 = 1'b0;
      #(TD1) clk2a = 1'b1;
      #(TD2) clk2 = 1'b1;
    end
  end
endmodule
