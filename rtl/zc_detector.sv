`timescale 1ns/1ps
// zc_detector: zero-crossing detector (hysteresis comparator and SR latch).
// Behavioural model of an analog circuit. The comparator's set output is
// high when vin rises above vref + HYST/2 and its reset output is high when
// vin falls below vref - HYST/2; an SR latch holds zcs in between, so slow
// or noisy crossings give a single clean edge. vref is the common-mode
// voltage (half of full scale), so zcs = 1 means a positive back-EMF.
// The 50 % threshold, the hysteresis and the SR latch follow the document;
// the hysteresis width is this design's.
module zc_detector #(
  parameter real HYST = 0.01     // volts
) (
  input  real  vin,
  input  real  vref,
  output logic zcs
);
  logic s, r;

  always_comb begin
    s = (vin > vref + HYST / 2.0);
    r = (vin < vref - HYST / 2.0);
  end

  // the SR latch of the detector: a latch is the intended circuit here
  always_latch begin
    if (s)      zcs = 1'b1;
    else if (r) zcs = 1'b0;
  end
endmodule
