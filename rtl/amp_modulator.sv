// amp_modulator: amplitude modulation of an NCO carrier by a multiplier.
//
// y = amp * carrier / 2^(DW-1), saturated to DW bits, registered (one clock).
// The NCO core has no amplitude input, so the amplitude loop output (or the
// reference amplitude) scales the NCO's cos output here before the DAC.
module amp_modulator #(
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] amp,
  input  logic signed [DW-1:0] carrier,
  output logic signed [DW-1:0] y
);
  logic signed [2*DW-1:0] p;
  logic signed [DW:0]     ps;
  assign p  = amp * carrier;
  assign ps = (DW+1)'(p >>> (DW - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)                                  y <= '0;
    else if (ps > (DW+1)'(2 ** (DW - 1) - 1))    y <= DW'(2 ** (DW - 1) - 1);
    else if (ps < -(DW+1)'(2 ** (DW - 1)))       y <= {1'b1, {(DW-1){1'b0}}};
    else                                         y <= DW'(ps);
  end
endmodule
