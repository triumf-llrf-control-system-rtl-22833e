// loop_filter: proportional-integral loop filter of a Costas loop ("LF").
//
// f = ftw_center + (pe * kp) / 2^KP_SHIFT + integ / 2^KI_SHIFT, with
// integ += pe * ki every clock. The output f is the NCO frequency word. At reset
// the integrator is cleared so the loop starts at ftw_center; the integrator is
// what holds the frequency once the phase error is zero. The description names the
// loop filter only; the PI form, gains and widths are this implementation's
// choice. One clock of latency from pe to f.
module loop_filter #(
  parameter int unsigned DW       = 16,
  parameter int unsigned PH_W     = 32,
  parameter int unsigned KP_SHIFT = 4,
  parameter int unsigned KI_SHIFT = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] pe,
  input  logic [PH_W-1:0]      ftw_center,
  input  logic [DW-1:0]        kp,
  input  logic [DW-1:0]        ki,
  output logic [PH_W-1:0]      f
);
  localparam int unsigned AW = PH_W + KI_SHIFT + 1;
  logic signed [2*DW:0]  prop, intg_in;
  logic signed [AW-1:0]  integ, integ_next;
  logic signed [PH_W-1:0] corr;

  assign prop    = pe * $signed({1'b0, kp});
  assign intg_in = pe * $signed({1'b0, ki});
  assign integ_next = integ + AW'(intg_in);
  assign corr = PH_W'(prop >>> KP_SHIFT) + PH_W'(integ_next >>> KI_SHIFT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ <= '0;
      f     <= '0;
    end else begin
      integ <= integ_next;
      f     <= ftw_center + $unsigned(corr);
    end
  end
endmodule
