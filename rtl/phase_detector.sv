// phase_detector: Costas-loop phase detector, Pe = I * Q.
//
// With I = A/2 cos(dtheta) and Q = A/2 sin(dtheta) the product is
// (A^2 / 8) sin(2 dtheta): it is zero when the NCO is in phase (or in
// anti-phase) with the input and its sign tells which way to steer. The product
// is scaled by 2^-(DW-1) and saturated to DW bits; one clock of latency.
module phase_detector #(
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] i_i,
  input  logic signed [DW-1:0] q_i,
  output logic signed [DW-1:0] pe
);
  logic signed [2*DW-1:0] p;
  logic signed [DW:0]     ps;
  assign p  = i_i * q_i;
  assign ps = (DW+1)'(p >>> (DW - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) pe <= '0;
    else if (ps > (DW+1)'(2 ** (DW - 1) - 1)) pe <= DW'(2 ** (DW - 1) - 1);
    else pe <= DW'(ps);
  end
endmodule
