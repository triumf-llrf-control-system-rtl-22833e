// llrf_top: FPGA firmware of a digital low-level RF (LLRF) controller for a
// single buncher cavity at 35.36 MHz, driven by a generator.
//
// Three parts run side by side on one sample clock:
//  * reference_pll_chain: two Costas-loop PLLs with a global phase shifter
//    between them lock to the digitised 35.36 MHz reference and produce the
//    frequency word f of the system;
//  * two harmonic_ftw multipliers scale f by the CPU's integer ratio for the
//    cavity loop (amp_phase_ctrl: demodulation, CORDIC, amplitude and phase PID,
//    drive NCO, RF on/off and pulse/CW gate and amplitude multiplier, to the
//    amplifier-chain DAC) and for the
//    ISAC II reference output (an NCO with phase P_Ref and amplitude A_Ref);
//  * motor_controller: step/direction pulses for the cavity tuner with limit
//    switches, three modes and a step counter.
// The ADCs and DACs are outside: their sample buses are ports. The CPU's GPIO
// registers are outside too: the cfg struct carries everything it writes, the
// status struct everything it reads. The tuning loop itself (detuning angle from
// the drive and cavity phases) runs in software on a PC, which reads
// status.drive_phase and status.cav_phase and writes cfg.motor.
// All NCOs are reset together so that equal frequency words keep them in phase.
module llrf_top
  import llrf_pkg::*;
#(
  parameter int unsigned ITER      = 16,
  parameter int unsigned LPF_SHIFT = 4,
  parameter int unsigned KP_SHIFT  = 4,
  parameter int unsigned KI_SHIFT  = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [DW-1:0]   adc_ref,
  input  logic signed [DW-1:0]   adc_cav,
  output logic signed [DW-1:0]   dac_cav,
  output logic signed [DW-1:0]   dac_ref,
  input  logic                   up_limit_in,
  input  logic                   down_limit_in,
  output logic                   motor_en,
  output logic                   motor_dir,
  output logic                   motor_pulse,
  input  llrf_cfg_t              cfg,
  output llrf_status_t           status
);
  logic [PH_W-1:0]      f1, f2, ftw_cav, ftw_ref, ph1, ph2, ref_ph;
  logic signed [DW-1:0] pd1, pd2, ref_c, ref_s;

  reference_pll_chain #(.DW(DW), .PH_W(PH_W), .ITER(ITER), .LPF_SHIFT(LPF_SHIFT),
                        .KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT)) u_ref (
    .clk, .rst_n, .adc_ref, .pll1_cfg(cfg.pll1), .pll2_cfg(cfg.pll2),
    .global_phase(cfg.global_phase), .f1, .f2, .pd1, .pd2,
    .nco1_phase(ph1), .nco2_phase(ph2)
  );

  harmonic_ftw #(.PH_W(PH_W), .RATIO_W(8)) u_h_cav (
    .clk, .rst_n, .f(f2), .ratio(cfg.harmonic), .ftw(ftw_cav)
  );
  harmonic_ftw #(.PH_W(PH_W), .RATIO_W(8)) u_h_ref (
    .clk, .rst_n, .f(f2), .ratio(cfg.harmonic), .ftw(ftw_ref)
  );

  amp_phase_ctrl #(.DW(DW), .PH_W(PH_W), .ITER(ITER), .LPF_SHIFT(LPF_SHIFT)) u_cav (
    .clk, .rst_n, .adc_cav, .ftw(ftw_cav), .amp_cfg(cfg.amp), .pha_cfg(cfg.pha), .rf_cfg(cfg.rf),
    .dac_cav, .cav_amp(status.cav_amp), .cav_phase(status.cav_phase),
    .drive_amp(status.drive_amp), .drive_phase(status.drive_phase), .rf_gate(status.rf_gate)
  );

  // ISAC II reference output
  nco #(.DW(DW), .PH_W(PH_W), .ITER(ITER)) u_ref_nco (
    .clk, .rst_n, .ftw(ftw_ref), .poff(cfg.p_ref), .cos_o(ref_c), .sin_o(ref_s),
    .phase_o(ref_ph)
  );
  amp_modulator #(.DW(DW)) u_ref_am (
    .clk, .rst_n, .amp(cfg.a_ref), .carrier(ref_c), .y(dac_ref)
  );

  motor_controller #(.CNT_W(32)) u_motor (
    .clk, .rst_n, .cfg(cfg.motor), .up_limit_in, .down_limit_in,
    .en_out(motor_en), .dir_out(motor_dir), .pulse_out(motor_pulse), .status(status.motor)
  );

  assign status.pll1_f  = f1;
  assign status.pll2_f  = f2;
  assign status.pll1_pd = pd1;
  assign status.pll2_pd = pd2;
endmodule
