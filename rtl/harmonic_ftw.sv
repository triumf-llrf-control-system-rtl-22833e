// harmonic_ftw: frequency word times an integer harmonic ratio.
//
// The NCOs that make the outputs take their frequency word from the second
// reference PLL multiplied by the integer set by the CPU, so an output can run at
// an integer multiple of the reference frequency. Because every NCO accumulator
// starts from zero at reset, an NCO fed ratio*f accumulates exactly ratio times
// the phase of the PLL's NCO (modulo one turn), so the multiple stays
// phase-locked. The product is taken modulo 2^PH_W and registered: one clock.
module harmonic_ftw #(
  parameter int unsigned PH_W    = 32,
  parameter int unsigned RATIO_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PH_W-1:0]    f,
  input  logic [RATIO_W-1:0] ratio,
  output logic [PH_W-1:0]    ftw
);
  logic [PH_W-1:0] prod;
  assign prod = f * PH_W'(ratio);

  always_ff @(posedge clk) begin
    if (!rst_n) ftw <= '0;
    else        ftw <= prod;
  end
endmodule
