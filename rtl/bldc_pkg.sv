`timescale 1ns/1ps
// bldc_pkg: types and constants shared by the sensorless commutation IC.
//
// Register map of the serial interface (2-bit address, 12-bit data):
//   00 Dth        delay-circuit threshold, signed microseconds, reset value 10
//   01 gamma_i    phase-shifter up-count increment, unsigned, reset value 20
//   10 dtheta     phase advance angle, signed, 0.1 degree units, reset value 0
//   11 speed      estimated speed, signed rad/s, read only
// The register map and ranges follow the published parameter table; the
// reset value of gamma_i follows the default increment given in the text.
// The six-step table, the phase-select code and the hall-like pattern are
// this design's own encoding.
package bldc_pkg;

  localparam int unsigned REG_W = 12;          // serial data word
  localparam int unsigned CNT_W = 16;          // phase shifter counters

  typedef enum logic [1:0] {
    ADDR_DTH    = 2'b00,
    ADDR_GI     = 2'b01,
    ADDR_DTHETA = 2'b10,
    ADDR_SPEED  = 2'b11
  } reg_addr_e;

  localparam logic signed [REG_W-1:0] DTH_RST    = 12'sd10;
  localparam logic        [REG_W-1:0] GI_RST     = 12'd20;
  localparam logic signed [REG_W-1:0] DTHETA_RST = 12'sd0;

  // Analog multiplexer select S1,S0: which terminal voltage is non-excited.
  typedef enum logic [1:0] {
    SEL_A = 2'b00,
    SEL_B = 2'b01,
    SEL_C = 2'b10
  } phase_sel_e;

  // Operating mode of the start-up circuit / commutation controller.
  typedef enum logic [1:0] {
    MODE_IDLE       = 2'd0,
    MODE_ALIGN      = 2'd1,
    MODE_STEPPING   = 2'd2,
    MODE_SENSORLESS = 2'd3
  } mode_e;

  // Six gate drive signals of the three-phase bridge.
  typedef struct packed {
    logic ap;  // Ga+
    logic an;  // Ga-
    logic bp;  // Gb+
    logic bn;  // Gb-
    logic cp;  // Gc+
    logic cn;  // Gc-
  } gates_t;

  // One row of the six-step look-up table.
  typedef struct packed {
    gates_t     gates;   // bridge switches that conduct in this step
    phase_sel_e fsel;    // non-excited phase of this step
    logic [2:0] hall;    // commutation signals h_a, h_b, h_c
  } step_row_t;

  // Step s conducts (from + to -): 0 A->B, 1 A->C, 2 B->C, 3 B->A, 4 C->A, 5 C->B.
  function automatic step_row_t step_lut(input logic [2:0] s);
    step_row_t r;
    case (s)
      3'd0:    r = '{gates: 6'b10_01_00, fsel: SEL_C, hall: 3'b101};
      3'd1:    r = '{gates: 6'b10_00_01, fsel: SEL_B, hall: 3'b100};
      3'd2:    r = '{gates: 6'b00_10_01, fsel: SEL_A, hall: 3'b110};
      3'd3:    r = '{gates: 6'b01_10_00, fsel: SEL_C, hall: 3'b010};
      3'd4:    r = '{gates: 6'b01_00_10, fsel: SEL_B, hall: 3'b011};
      default: r = '{gates: 6'b00_01_10, fsel: SEL_A, hall: 3'b001};
    endcase
    return r;
  endfunction

endpackage
