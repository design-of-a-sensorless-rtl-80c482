`timescale 1ns/1ps
// seq_divider: unsigned restoring divider, one quotient bit per clock.
// A start pulse loads num/den; NW clocks later done pulses for one cycle and
// quot holds floor(num/den) until the next start. Division by zero returns
// all ones. Shared by the phase compensation and speed estimation circuits.
module seq_divider #(
  parameter int unsigned NW = 24,   // dividend (and quotient) width
  parameter int unsigned DW = 16    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] q;
  logic [DW-1:0] rem;
  logic [DW-1:0] d;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;

  always_comb trial = {rem, q[NW-1]} - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      rem  <= '0;
      d    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= num;
        rem  <= '0;
        d    <= den;
        cnt  <= CW'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[DW]) begin
          rem <= trial[DW-1:0];
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= {rem[DW-2:0], q[NW-1]};
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= (d == '0) ? '1 : (trial[DW] ? {q[NW-2:0], 1'b0} : {q[NW-2:0], 1'b1});
        end
      end
    end
  end
endmodule
