`timescale 1ns/1ps
// commutation_ctrl: six-step commutation state and output look-up table.
//
// A 3-bit step counter (0..5) addresses the look-up table of bldc_pkg, which
// gives for each step the two bridge switches that conduct, the non-excited
// phase (to the delay circuit and, through it, to the multiplexer) and the
// commutation signals h_a, h_b, h_c. The step advances by one:
//   - on step_open pulses from the start-up circuit in MODE_STEPPING,
//   - on comm pulses from the digital phase shifter in MODE_SENSORLESS.
// In MODE_ALIGN the step is forced to ALIGN_STEP so that the rotor lines up
// with a known voltage vector; in MODE_IDLE all switches are off.
// Gate outputs: upper switches are chopped by PWM, lower switches conduct
// for the whole step. Brake turns all upper switches off and all lower ones
// on (short-circuit braking). FG toggles on every commutation. advanced
// pulses for one clock whenever the step changes.
//
// Six-step commutation, the PWM and Brake inputs, the FG output and a
// look-up table driving the gates follow the document; where PWM is applied,
// the brake action and the table encoding are this design's choices.
module commutation_ctrl
  import bldc_pkg::*;
#(
  parameter logic [2:0] ALIGN_STEP = 3'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode,
  input  logic       step_open,   // start-up circuit step
  input  logic       comm,        // phase shifter commutation
  input  logic       pwm,
  input  logic       brake,
  output logic [2:0] step,
  output gates_t     gates,
  output phase_sel_e next_sel,    // non-excited phase of the current step
  output logic [2:0] hall,        // h_a, h_b, h_c
  output logic       fg,
  output logic       advanced
);
  step_row_t row;
  logic      adv;

  always_comb begin
    unique case (mode)
      MODE_STEPPING:   adv = step_open;
      MODE_SENSORLESS: adv = comm;
      default:         adv = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step     <= ALIGN_STEP;
      advanced <= 1'b0;
    end else begin
      advanced <= 1'b0;
      if (mode == MODE_ALIGN || mode == MODE_IDLE) begin
        if (step != ALIGN_STEP) advanced <= 1'b1;
        step <= ALIGN_STEP;
      end else if (adv) begin
        step     <= (step == 3'd5) ? 3'd0 : step + 3'd1;
        advanced <= 1'b1;
      end
    end
  end

  always_comb begin
    row      = step_lut(step);
    next_sel = row.fsel;
    hall     = row.hall;
    fg       = step[0];
    if (brake) begin
      gates = '{ap: 1'b0, an: 1'b1, bp: 1'b0, bn: 1'b1, cp: 1'b0, cn: 1'b1};
    end else if (mode == MODE_IDLE) begin
      gates = '0;
    end else begin
      gates    = row.gates;
      gates.ap = row.gates.ap & pwm;
      gates.bp = row.gates.bp & pwm;
      gates.cp = row.gates.cp & pwm;
    end
  end

  // the two switches of one leg must never conduct together
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    !(gates.ap && gates.an) && !(gates.bp && gates.bn) && !(gates.cp && gates.cn));

endmodule
