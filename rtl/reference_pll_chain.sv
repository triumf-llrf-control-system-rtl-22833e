// reference_pll_chain: the two digital PLLs and the global phase shifter that
// make the frequency word of the whole system from the reference input.
//
// PLL 1, a Costas loop, locks its NCO to the digitised 35.36 MHz reference. Its
// cos/sin outputs pass through the global phase shifter, which delays them by the
// global phase x set by the CPU. PLL 2 locks to that shifted signal; its
// loop-filter output f is the frequency word handed (through the harmonic
// multipliers) to the output NCOs. Since every NCO starts from zero at reset and
// integrates the same words, the output NCOs follow PLL 2's NCO, which sits at the
// reference phase minus x (modulo 180 degrees, the Costas ambiguity). The chain of
// blocks follows the description; everything numeric is this implementation's.
module reference_pll_chain
  import llrf_pkg::pll_cfg_t;
#(
  parameter int unsigned DW        = 16,
  parameter int unsigned PH_W      = 32,
  parameter int unsigned ITER      = 16,
  parameter int unsigned LPF_SHIFT = 4,
  parameter int unsigned KP_SHIFT  = 4,
  parameter int unsigned KI_SHIFT  = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] adc_ref,
  input  pll_cfg_t             pll1_cfg,
  input  pll_cfg_t             pll2_cfg,
  input  logic [PH_W-1:0]      global_phase,
  output logic [PH_W-1:0]      f1,
  output logic [PH_W-1:0]      f2,
  output logic signed [DW-1:0] pd1,
  output logic signed [DW-1:0] pd2,
  output logic [PH_W-1:0]      nco1_phase,
  output logic [PH_W-1:0]      nco2_phase
);
  logic signed [DW-1:0] c1, s1, c2, s2, shifted;
  logic signed [DW-1:0] i1, q1, i2, q2;

  costas_pll #(.DW(DW), .PH_W(PH_W), .ITER(ITER), .LPF_SHIFT(LPF_SHIFT),
               .KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT)) u_pll1 (
    .clk, .rst_n, .x(adc_ref), .ftw_center(pll1_cfg.ftw_center), .kp(pll1_cfg.kp),
    .ki(pll1_cfg.ki), .f(f1), .nco_cos(c1), .nco_sin(s1), .nco_phase(nco1_phase),
    .pd(pd1), .i_lp(i1), .q_lp(q1)
  );

  global_phase_shifter #(.DW(DW), .PH_W(PH_W), .ITER(ITER)) u_shift (
    .clk, .rst_n, .c_in(c1), .s_in(s1), .gphase(global_phase), .y(shifted)
  );

  costas_pll #(.DW(DW), .PH_W(PH_W), .ITER(ITER), .LPF_SHIFT(LPF_SHIFT),
               .KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT)) u_pll2 (
    .clk, .rst_n, .x(shifted), .ftw_center(pll2_cfg.ftw_center), .kp(pll2_cfg.kp),
    .ki(pll2_cfg.ki), .f(f2), .nco_cos(c2), .nco_sin(s2), .nco_phase(nco2_phase),
    .pd(pd2), .i_lp(i2), .q_lp(q2)
  );
endmodule
