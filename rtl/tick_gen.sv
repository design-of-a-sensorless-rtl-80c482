`timescale 1ns/1ps
// tick_gen: divides the system clock into a one-cycle enable pulse.
// tick is high for one clock every DIV clocks. Used for the 1 us time base of
// the delay circuit, the 200 kHz sampling of the phase shifter and the
// 20 kHz sampling of the speed estimator.
module tick_gen #(
  parameter int unsigned DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == W'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
