`timescale 1ns/1ps
// delay_circuit: masks the back-EMF estimate after each commutation.
//
// Right after a commutation the phase that has just been switched off still
// conducts through its free-wheeling diode, and the estimate of its back-EMF
// is wrong. On a commutation pulse the circuit raises mask and counts
// microsecond ticks; when the count reaches the programmed threshold Dth it
// drops mask, pulses select and switches the analog multiplexer (S1,S0) to
// the new non-excited phase next_sel. A Dth of zero or less switches at once
// without masking. A new commutation during the delay restarts it.
//
// The masking, the programmable threshold in microseconds and the
// multiplexer switching at the end of the delay follow the document; the
// treatment of non-positive Dth is this design's choice.
module delay_circuit
  import bldc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    us_tick,   // 1 us time base
  input  logic                    comm,      // commutation happened
  input  phase_sel_e              next_sel,  // non-excited phase of new step
  input  logic signed [REG_W-1:0] dth,       // threshold, microseconds
  output phase_sel_e              sel,       // S1,S0 to the multiplexer
  output logic                    mask,
  output logic                    select,    // one-clock pulse at the switch
  output logic        [REG_W-1:0] count      // delay count
);
  phase_sel_e pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel     <= SEL_C;
      pending <= SEL_C;
      mask    <= 1'b0;
      select  <= 1'b0;
      count   <= '0;
    end else begin
      select <= 1'b0;
      if (comm) begin
        count <= '0;
        if (dth <= 12'sd0) begin
          sel    <= next_sel;
          mask   <= 1'b0;
          select <= 1'b1;
        end else begin
          pending <= next_sel;
          mask    <= 1'b1;
        end
      end else if (mask && us_tick) begin
        if (count + 1'b1 >= REG_W'(dth)) begin
          sel    <= pending;
          mask   <= 1'b0;
          select <= 1'b1;
        end
        count <= count + 1'b1;
      end
    end
  end

endmodule
