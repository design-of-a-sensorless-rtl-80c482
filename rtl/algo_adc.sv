`timescale 1ns/1ps
// algo_adc: single-channel 12-bit algorithmic A/D converter.
// Behavioural model of an analog circuit. A start pulse samples vin; then,
// one bit per clock from the MSB, the held residue v is compared with
// VREF/2, the bit is decided and the residue becomes 2*v - bit*VREF (the
// multiply-by-two and subtract step of an algorithmic converter). After N
// clocks dout holds the offset-binary code, 0 for 0 V up to 2^N-1 near VREF,
// and valid pulses for one clock. Started at 20 kHz in this design.
// Resolution, single channel and the algorithmic principle follow the
// document; the reference, the timing and the code format are this design's.
module algo_adc #(
  parameter int unsigned N    = 12,
  parameter real         VREF = 3.3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  real          vin,
  output logic [N-1:0] dout,
  output logic         valid
);
  real                     v;
  logic [N-2:0]            code;
  logic [$clog2(N+1)-1:0]  cnt;
  logic                    bit_d;

  always_comb bit_d = (v >= VREF / 2.0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v     <= 0.0;
      code  <= '0;
      cnt   <= '0;
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        v    <= (vin < 0.0) ? 0.0 : ((vin > VREF) ? VREF : vin);
        cnt  <= ($clog2(N+1))'(N);
        code <= '0;
      end else if (cnt != '0) begin
        code <= {code[N-3:0], bit_d};
        v    <= 2.0 * v - (bit_d ? VREF : 0.0);
        cnt  <= cnt - 1'b1;
        if (cnt == 1) begin
          dout  <= {code, bit_d};
          valid <= 1'b1;
        end
      end
    end
  end
endmodule
