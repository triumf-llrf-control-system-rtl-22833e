// amp_phase_ctrl: amplitude and phase loop of the cavity.
//
// The cavity pickup samples are mixed with a demodulating NCO and low-pass
// filtered (two first-order sections) to the baseband pair I2, Q2; a vectoring CORDIC turns them into the
// cavity amplitude R = sqrt(I2^2 + Q2^2) and phase Theta = atan2(Q2, I2). Two
// pid_ctrl blocks compare R with the amplitude set point and Theta with the phase
// set point; each has an open-loop value and a switch. The phase loop output is
// the phase offset P of the drive NCO (top DW bits of the turn), the amplitude
// loop output, gated by the RF on/off and pulse/CW switch (rf_pulse_gate),
// multiplies the drive NCO's cos output, and the product goes to the DAC that
// feeds the amplifier chain. The demodulating and drive NCOs take the
// same frequency word and are reset together, so with P = 0 they are in phase and
// Theta measures the cavity phase against the drive. The structure follows the
// description's cavity loop; widths, filters and latencies are this
// implementation's. Round-trip latency from dac_cav back through a zero-delay
// cavity to the PID inputs is about 2*ITER + 12 clocks.
module amp_phase_ctrl
  import llrf_pkg::pid_cfg_t, llrf_pkg::rf_cfg_t;
#(
  parameter int unsigned DW        = 16,
  parameter int unsigned PH_W      = 32,
  parameter int unsigned ITER      = 16,
  parameter int unsigned LPF_SHIFT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] adc_cav,
  input  logic [PH_W-1:0]      ftw,
  input  pid_cfg_t             amp_cfg,
  input  pid_cfg_t             pha_cfg,
  input  rf_cfg_t              rf_cfg,
  output logic signed [DW-1:0] dac_cav,
  output logic [DW:0]          cav_amp,
  output logic [DW-1:0]        cav_phase,
  output logic signed [DW-1:0] drive_amp,
  output logic signed [DW-1:0] drive_phase,
  output logic                 rf_gate
);
  logic signed [DW-1:0] lo_c, lo_s, i_mix, q_mix, i_f1, q_f1, i2, q2;
  logic signed [DW-1:0] drv_c, drv_s;
  logic [PH_W-1:0]      theta, lo_ph, drv_ph;
  logic signed [DW-1:0] amp_meas, amp_err, pha_err, amp_gated;

  // demodulating NCO
  nco #(.DW(DW), .PH_W(PH_W), .ITER(ITER)) u_lo (
    .clk, .rst_n, .ftw, .poff('0), .cos_o(lo_c), .sin_o(lo_s), .phase_o(lo_ph)
  );
  iq_mixer #(.DW(DW)) u_mix (
    .clk, .rst_n, .x(adc_cav), .c(lo_c), .s(lo_s), .i_o(i_mix), .q_o(q_mix)
  );
  // two cascaded first-order sections per channel: the sum-frequency term
  // (2 x 35.36 MHz, folded to 29.28 MHz at 100 MHz sampling) is cut to ~0.2 %
  lowpass_iir #(.DW(DW), .SHIFT(LPF_SHIFT)) u_lpf_i1 (.clk, .rst_n, .x(i_mix), .y(i_f1));
  lowpass_iir #(.DW(DW), .SHIFT(LPF_SHIFT)) u_lpf_q1 (.clk, .rst_n, .x(q_mix), .y(q_f1));
  lowpass_iir #(.DW(DW), .SHIFT(LPF_SHIFT)) u_lpf_i2 (.clk, .rst_n, .x(i_f1), .y(i2));
  lowpass_iir #(.DW(DW), .SHIFT(LPF_SHIFT)) u_lpf_q2 (.clk, .rst_n, .x(q_f1), .y(q2));
  cordic_vector #(.DW(DW), .PH_W(PH_W), .ITER(ITER)) u_polar (
    .clk, .rst_n, .x(i2), .y(q2), .mag(cav_amp), .theta
  );

  assign cav_phase = theta[PH_W-1 -: DW];
  // R never exceeds 2^(DW-1) for in-range inputs; saturate to be safe
  assign amp_meas  = (cav_amp > (DW+1)'(2 ** (DW - 1) - 1)) ? DW'(2 ** (DW - 1) - 1)
                                                           : DW'(cav_amp);

  pid_ctrl #(.DW(DW)) u_amp_pid (
    .clk, .rst_n, .setpoint(amp_cfg.setpoint), .meas(amp_meas),
    .kp(amp_cfg.kp), .ki(amp_cfg.ki), .kd(amp_cfg.kd), .limit(amp_cfg.limit),
    .closed(amp_cfg.closed), .open_val(amp_cfg.open_val), .e(amp_err), .u(drive_amp)
  );
  pid_ctrl #(.DW(DW)) u_pha_pid (
    .clk, .rst_n, .setpoint(pha_cfg.setpoint), .meas($signed(cav_phase)),
    .kp(pha_cfg.kp), .ki(pha_cfg.ki), .kd(pha_cfg.kd), .limit(pha_cfg.limit),
    .closed(pha_cfg.closed), .open_val(pha_cfg.open_val), .e(pha_err), .u(drive_phase)
  );

  // drive NCO, phase offset from the phase loop
  nco #(.DW(DW), .PH_W(PH_W), .ITER(ITER)) u_drive (
    .clk, .rst_n, .ftw, .poff({drive_phase, {(PH_W-DW){1'b0}}}),
    .cos_o(drv_c), .sin_o(drv_s), .phase_o(drv_ph)
  );
  // RF on/off and pulse/CW gate on the amplitude word
  rf_pulse_gate #(.DW(DW)) u_gate (
    .clk, .rst_n, .cfg(rf_cfg), .amp_in(drive_amp), .amp_out(amp_gated), .gate(rf_gate)
  );
  amp_modulator #(.DW(DW)) u_am (.clk, .rst_n, .amp(amp_gated), .carrier(drv_c), .y(dac_cav));
endmodule
