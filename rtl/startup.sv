`timescale 1ns/1ps
// startup: open-loop start-up circuit.
//
// A BLDC motor gives no back-EMF at standstill, so it is started open loop:
//   MODE_ALIGN     the commutation controller applies one fixed voltage
//                  vector for ALIGN_SAMPLES sample ticks, pulling the rotor
//                  to a known position;
//   MODE_STEPPING  the step rate rises linearly in time (constant
//                  acceleration, as with a constant start current): at every
//                  sample tick vel += ACCEL and ang += vel, and a step pulse
//                  is given each time ang passes STEP_ANGLE (60 electrical
//                  degrees), so the electrical angle follows a*t^2/2;
//   MODE_SENSORLESS once vel reaches VEL_MIN, the phase shifter takes over.
// run low (the Brake input) returns to MODE_IDLE; run high starts again.
//
// The three phases and the constant acceleration follow the document. The
// angle/velocity accumulators and all default numbers are this design's:
// with 200 kHz samples and 2^28 = 60 degrees, VEL_MIN = 241592 is 300 rpm
// for a 12-pole motor (the document's minimum controllable speed), reached
// after 0.1 s of ramp; ALIGN_SAMPLES = 10000 is 50 ms.
module startup
  import bldc_pkg::*;
#(
  parameter int unsigned ALIGN_SAMPLES = 10000,
  parameter int unsigned ACCEL         = 12,
  parameter int unsigned VEL_MIN       = 241592,
  parameter int unsigned STEP_ANGLE    = 32'h1000_0000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sample,
  input  logic  run,
  output mode_e mode,
  output logic  step_open
);
  logic [31:0] cnt, vel, ang;
  logic [32:0] ang_sum;

  assign ang_sum = {1'b0, ang} + {1'b0, vel};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_IDLE;
      cnt       <= '0;
      vel       <= '0;
      ang       <= '0;
      step_open <= 1'b0;
    end else begin
      step_open <= 1'b0;
      if (!run) begin
        mode <= MODE_IDLE;
      end else if (sample) begin
        unique case (mode)
          MODE_IDLE: begin
            mode <= MODE_ALIGN;
            cnt  <= '0;
          end
          MODE_ALIGN: begin
            cnt <= cnt + 1'b1;
            if (cnt + 1 >= ALIGN_SAMPLES) begin
              mode <= MODE_STEPPING;
              vel  <= '0;
              ang  <= '0;
            end
          end
          MODE_STEPPING: begin
            vel <= vel + ACCEL;
            if (ang_sum >= 33'(STEP_ANGLE)) begin
              ang       <= 32'(ang_sum - 33'(STEP_ANGLE));
              step_open <= 1'b1;
            end else begin
              ang <= ang_sum[31:0];
            end
            if (vel >= VEL_MIN) mode <= MODE_SENSORLESS;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
