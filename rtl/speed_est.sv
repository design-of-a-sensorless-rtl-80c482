`timescale 1ns/1ps
// speed_est: speed estimation circuit.
//
// Two estimates are formed and one is chosen at every speed-loop sample
// (spd_tick, 20 kHz by default):
//
//  * From the commutation interval. The time between two commutations, Tc,
//    is 60 electrical degrees, so omega~ = 2*pi/(3*P*Tc) rad/s. Tc is counted
//    in phase-shifter samples (ps_tick) and KW = 2*pi*PS_HZ/(3*P) is divided
//    by it with a sequential divider at each commutation.
//  * From the slope of the non-excited phase back-EMF. Each A/D sample moves
//    BMF_new into BMF_old. A sample is clean when its conversion started
//    (at spd_tick) with the diode-conduction mask low for at least SETTLE
//    phase-shifter samples (10 us by default, so the multiplexer and the
//    residue amplifier have settled on the new phase) and no mask or
//    commutation came before it was delivered. At spd_tick the difference
//    of two clean samples is taken into the slope register; otherwise the
//    register keeps its value. Its magnitude is limited to SLOPE_LIM and
//    scaled by Tc (counted in phase-shifter samples and converted to speed
//    samples with the constant SPD_HZ/PS_HZ) and by SCALE_NUM/2^SCALE_SHIFT
//    (= 1/K_E, K_E in A/D counts per rad/s), and the speed at the last
//    commutation is subtracted:
//        omega^(k) = |de(k)| * Tc / K_E - omega~(k_c)
//    |de|*Tc is the predicted swing of the back-EMF from the peak at the last
//    commutation (K_E*omega(k_c)) to the peak at the next one, so the result
//    is the speed expected at the next commutation, updated at every sample.
//    The speed at the last commutation is taken from the interval estimate
//    omega~: subtracting the slope estimate's own earlier value instead
//    makes a loop with a pole at -1 that oscillates at half the commutation
//    frequency, below the filter corner at low speed.
// When the commutation interval is no longer than a speed sample (Ts >= Tc,
// compared in phase-shifter samples) omega~ is used, otherwise omega^. The
// choice is filtered by a 2nd-order 500 Hz IIR low-pass and signed with the
// direction d, taken from whether the commutation step went up or down.
// speed is 12-bit signed rad/s. adc_valid must follow the conversion started
// at one spd_tick before the next spd_tick.
//
// The structure (BMF_new/BMF_old, SUB, mask, slope register, ABS, limiter,
// scaling, 2nd-order IIR at 500 Hz), the switch between the two estimates
// and the 20 kHz rate are the document's. The unit follows the document's
// register table (rad/s) rather than its interval formula, which gives rpm.
// KW, the scale factor (which depends on the motor's K_E and the sensing
// gain), the limiter value and the settling time after the mask are this
// design's.
module speed_est
  import bldc_pkg::*;
#(
  parameter int unsigned POLES       = 12,
  parameter int unsigned PS_HZ       = 200_000,
  parameter int unsigned SPD_HZ      = 20_000,
  parameter int unsigned ADC_W       = 12,
  parameter int unsigned SLOPE_LIM   = 2047,
  parameter int unsigned SCALE_NUM   = 128,
  parameter int unsigned SCALE_SHIFT = 8,
  parameter int unsigned SETTLE      = 2      // ps_ticks after the mask before a sample is clean
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ps_tick,    // phase shifter sample tick
  input  logic                    spd_tick,   // speed-loop sample tick (Speed_CLK)
  input  logic        [ADC_W-1:0] adc_data,   // offset binary
  input  logic                    adc_valid,
  input  logic                    comm,       // commutation happened
  input  logic        [2:0]       step,       // commutation step after comm
  input  logic                    mask,       // diode conduction mask
  output logic signed [REG_W-1:0] speed,
  output logic        [REG_W-1:0] w_tilde,    // from commutation interval
  output logic        [REG_W-1:0] w_hat,      // from back-EMF slope
  output logic                    use_tilde,  // Ts >= Tc
  output logic                    dir_neg
);
  localparam longint KW_L = (2 * 64'd314159265 * 64'(PS_HZ)) / (3 * 64'(POLES) * 64'd100000000);
  localparam logic [23:0] KW = 24'(KW_L);
  // scale per 200 kHz interval sample: SCALE_NUM/2^SCALE_SHIFT * SPD_HZ/PS_HZ,
  // with 8 more fraction bits
  localparam int unsigned KS = (SCALE_NUM * 256 * SPD_HZ + PS_HZ / 2) / PS_HZ;
  localparam int unsigned PW = ADC_W + 16 + 24;

  logic        [ADC_W-1:0] bmf_new, bmf_old;
  logic signed [ADC_W:0]   slope_reg;
  logic        [ADC_W-1:0] slope_abs, slope_lim;
  logic        [15:0]      tc_ps;
  logic        [15:0]      tc_ps_den;
  logic        [2:0]       step_prev;
  logic        [3:0]       settle_cnt;  // ps_ticks since mask or commutation
  logic                    conv_clean, new_clean, old_clean;
  logic                    dv_start, dv_done, dv_busy;
  logic        [23:0]      quot;
  logic        [PW-1:0]    prod;
  logic signed [PW:0]      w_slope;
  logic        [REG_W-1:0] w_raw;
  logic signed [REG_W:0]   filt_in, filt_out;

  seq_divider #(.NW(24), .DW(16)) u_div (
    .clk, .rst_n, .start(dv_start), .num(KW), .den(tc_ps_den),
    .busy(dv_busy), .done(dv_done), .quot
  );

  // ABS, limiter, scaling
  always_comb begin
    slope_abs = slope_reg[ADC_W] ? ADC_W'(-slope_reg) : ADC_W'(slope_reg);
    slope_lim = (slope_abs > ADC_W'(SLOPE_LIM)) ? ADC_W'(SLOPE_LIM) : slope_abs;
    prod      = (PW'(slope_lim) * PW'(tc_ps_den) * PW'(KS)) >> (SCALE_SHIFT + 8);
    w_slope   = $signed({1'b0, prod}) - $signed((PW+1)'(w_tilde));
    if (w_slope < 0)                            w_hat = '0;
    else if (w_slope > (PW+1)'(2**REG_W - 1))   w_hat = '1;
    else                                        w_hat = REG_W'(w_slope);
    use_tilde = (tc_ps_den < 16'(PS_HZ / SPD_HZ));   // Ts >= Tc
    w_raw     = use_tilde ? w_tilde : w_hat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bmf_new    <= '0;
      bmf_old    <= '0;
      slope_reg  <= '0;
      tc_ps      <= '0;
      tc_ps_den  <= '1;
      dv_start   <= 1'b0;
      w_tilde    <= '0;
      step_prev  <= '0;
      dir_neg    <= 1'b0;
      settle_cnt <= '0;
      conv_clean <= 1'b0;
      new_clean  <= 1'b0;
      old_clean  <= 1'b0;
    end else begin
      dv_start <= 1'b0;
      if (mask || comm)
        settle_cnt <= '0;
      else if (ps_tick && settle_cnt != '1)
        settle_cnt <= settle_cnt + 1'b1;
      if (adc_valid) begin
        bmf_old   <= bmf_new;
        bmf_new   <= adc_data;
        old_clean <= new_clean;
        new_clean <= conv_clean && !mask && !comm;
      end
      if (spd_tick) begin
        // a conversion starts now; it is clean if the input has settled
        conv_clean <= !mask && !comm && (settle_cnt >= 4'(SETTLE));
        if (new_clean && old_clean)
          slope_reg <= $signed({1'b0, bmf_new}) - $signed({1'b0, bmf_old});
      end
      if (comm) begin
        tc_ps      <= '0;
        tc_ps_den  <= tc_ps;
        dv_start   <= 1'b1;
        step_prev  <= step;
        if (step == ((step_prev == 3'd5) ? 3'd0 : step_prev + 3'd1))      dir_neg <= 1'b0;
        else if (step_prev == ((step == 3'd5) ? 3'd0 : step + 3'd1))      dir_neg <= 1'b1;
      end else begin
        if (ps_tick && tc_ps != '1)  tc_ps <= tc_ps + 1'b1;
      end
      if (dv_done)
        w_tilde <= (quot > 24'(2**REG_W - 1)) ? '1 : REG_W'(quot);
    end
  end

  assign filt_in = $signed({1'b0, w_raw});

  iir2 #(.XW(REG_W + 1)) u_iir (
    .clk, .rst_n, .en(spd_tick), .x(filt_in), .y(filt_out)
  );

  // sign with direction and saturate to the 12-bit register
  always_comb begin
    logic signed [REG_W:0] s;
    s = dir_neg ? -filt_out : filt_out;
    if (s > 13'sd2047)       speed = 12'sd2047;
    else if (s < -13'sd2048) speed = -12'sd2048;
    else                     speed = REG_W'(s);
  end

endmodule
