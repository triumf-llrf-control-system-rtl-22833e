// costas_pll: digital phase-locked loop built as a Costas loop.
//
// The input is mixed with the cos and sin of a local NCO; two low-pass filters
// keep the difference-frequency terms I and Q; the phase detector forms
// Pe = I*Q ~ sin(2 dtheta); the PI loop filter turns Pe into the NCO frequency
// word f. In lock the NCO runs at the input frequency, in phase with it or 180
// degrees away (the Costas loop cannot tell the two apart), and f is the
// frequency word of the input. The chain follows the description's loop
// (mixers, filters, PD, LF, NCO); filter type, gains and widths are this
// implementation's. Loop delay is ITER + 8 clocks. Gains kp, ki and the start
// word ftw_center are run-time inputs.
module costas_pll #(
  parameter int unsigned DW        = 16,
  parameter int unsigned PH_W      = 32,
  parameter int unsigned ITER      = 16,
  parameter int unsigned LPF_SHIFT = 4,
  parameter int unsigned KP_SHIFT  = 4,
  parameter int unsigned KI_SHIFT  = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] x,
  input  logic [PH_W-1:0]      ftw_center,
  input  logic [DW-1:0]        kp,
  input  logic [DW-1:0]        ki,
  output logic [PH_W-1:0]      f,
  output logic signed [DW-1:0] nco_cos,
  output logic signed [DW-1:0] nco_sin,
  output logic [PH_W-1:0]      nco_phase,
  output logic signed [DW-1:0] pd,
  output logic signed [DW-1:0] i_lp,
  output logic signed [DW-1:0] q_lp
);
  logic signed [DW-1:0] i_mix, q_mix;

  iq_mixer #(.DW(DW)) u_mix (
    .clk, .rst_n, .x, .c(nco_cos), .s(nco_sin), .i_o(i_mix), .q_o(q_mix)
  );
  lowpass_iir #(.DW(DW), .SHIFT(LPF_SHIFT)) u_lpf_i (.clk, .rst_n, .x(i_mix), .y(i_lp));
  lowpass_iir #(.DW(DW), .SHIFT(LPF_SHIFT)) u_lpf_q (.clk, .rst_n, .x(q_mix), .y(q_lp));
  phase_detector #(.DW(DW)) u_pd (.clk, .rst_n, .i_i(i_lp), .q_i(q_lp), .pe(pd));
  loop_filter #(.DW(DW), .PH_W(PH_W), .KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT)) u_lf (
    .clk, .rst_n, .pe(pd), .ftw_center, .kp, .ki, .f
  );
  nco #(.DW(DW), .PH_W(PH_W), .ITER(ITER)) u_nco (
    .clk, .rst_n, .ftw(f), .poff('0), .cos_o(nco_cos), .sin_o(nco_sin), .phase_o(nco_phase)
  );
endmodule
