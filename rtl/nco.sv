// nco: numerically controlled oscillator with frequency word F and phase
// offset P (the NCO blocks with F and P inputs).
//
// A PH_W-bit phase accumulator adds the frequency word every clock; the phase
// offset is added to the accumulator and the sum is turned into full-scale cos and
// sin samples by a rotation CORDIC. So the output frequency is
// F * f_clk / 2^PH_W and P shifts the phase by P / 2^PH_W of a turn. The
// accumulator starts from zero at reset, so NCOs that are reset together and fed
// the same sequence of frequency words stay exactly in phase. Like the core the
// design description uses, it has no amplitude input: amplitude is applied by a
// separate multiplier. phase_o is the accumulator (before the offset); cos_o and
// sin_o follow it by ITER + 3 clocks.
module nco #(
  parameter int unsigned DW   = 16,
  parameter int unsigned PH_W = 32,
  parameter int unsigned ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PH_W-1:0]      ftw,
  input  logic [PH_W-1:0]      poff,
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o,
  output logic [PH_W-1:0]      phase_o
);
  logic [PH_W-1:0] acc;
  logic [PH_W-1:0] ph;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      ph  <= '0;
    end else begin
      acc <= acc + ftw;
      ph  <= acc + poff;
    end
  end

  assign phase_o = acc;

  cordic_rotate #(.DW(DW), .PH_W(PH_W), .ITER(ITER)) u_sincos (
    .clk, .rst_n,
    .amp   (DW'(2 ** (DW - 1) - 1)),
    .phase (ph),
    .cos_o,
    .sin_o
  );
endmodule
