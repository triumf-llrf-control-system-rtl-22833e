// lowpass_iir: first-order recursive low-pass filter, y += (x - y) / 2^SHIFT.
//
// It removes the sum-frequency term left by a quadrature mixer. The DC gain is 1,
// the time constant is about 2^SHIFT clocks (-3 dB at f_clk / (2 pi 2^SHIFT)).
// The state keeps SHIFT extra fractional bits so small inputs are not lost. The
// design description draws a low-pass filter after each mixer without giving its
// type or order; the first-order IIR is this implementation's choice. Output is
// registered; a step on x reaches 63 % of its size after 2^SHIFT clocks.
module lowpass_iir #(
  parameter int unsigned DW    = 16,
  parameter int unsigned SHIFT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] y
);
  localparam int unsigned SW = DW + SHIFT + 1;
  logic signed [SW-1:0] acc;  // y scaled by 2^SHIFT

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
    end else begin
      acc <= acc + SW'(x) - (acc >>> SHIFT);
    end
  end

  assign y = DW'(acc >>> SHIFT);
endmodule
