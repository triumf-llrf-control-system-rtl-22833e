// iq_mixer: quadrature multiplier. The input samples are multiplied by the cos
// and sin samples of a local NCO, giving I = x*cos and Q = -x*sin.
//
// With x = A cos(wc t) and an NCO at w0 t + phi, low-pass filtering the outputs
// leaves I = A/2 cos(dtheta) and Q = A/2 sin(dtheta), dtheta = (wc - w0) t - phi,
// the sign convention of the description's Costas-loop equations. Q is negated so
// that a positive dtheta (NCO lagging) gives a positive Q. Products are scaled by
// 2^-(DW-1) (full-scale NCO = 1) and registered: one clock of latency.
module iq_mixer #(
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] x,
  input  logic signed [DW-1:0] c,
  input  logic signed [DW-1:0] s,
  output logic signed [DW-1:0] i_o,
  output logic signed [DW-1:0] q_o
);
  logic signed [2*DW-1:0] pi, pq;
  assign pi = x * c;
  assign pq = x * s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_o <= '0;
      q_o <= '0;
    end else begin
      // |x*s| < 2^(2DW-2) unless both are the most negative value; NCOs never are.
      i_o <= DW'(pi >>> (DW - 1));
      q_o <= DW'(-(pq >>> (DW - 1)));
    end
  end
endmodule
