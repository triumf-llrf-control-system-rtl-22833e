// global_phase_shifter: I/Q phase shifter between the two reference PLLs.
//
// The cos and sin outputs of the first PLL's NCO (angle theta) are multiplied by
// cos(x) and sin(x) of the global phase x and summed:
//   y = cos(theta) cos(x) + sin(theta) sin(x) = cos(theta - x).
// y is a clean copy of the locked reference delayed by x, and the second PLL
// locks to it, so changing x moves the phase of every output. cos(x) and sin(x)
// come from a rotation CORDIC fed with x. The multiply-and-sum structure with a
// global phase follows the description; the pairing of the products (which gives
// theta - x) and the scaling are this implementation's choice. y follows c_in and
// s_in by 2 clocks and x by ITER + 4 clocks.
module global_phase_shifter #(
  parameter int unsigned DW   = 16,
  parameter int unsigned PH_W = 32,
  parameter int unsigned ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] c_in,
  input  logic signed [DW-1:0] s_in,
  input  logic [PH_W-1:0]      gphase,
  output logic signed [DW-1:0] y
);
  logic signed [DW-1:0]   cx, sx;
  logic signed [2*DW-1:0] pc, ps;
  logic signed [2*DW:0]   sum;

  cordic_rotate #(.DW(DW), .PH_W(PH_W), .ITER(ITER)) u_rot (
    .clk, .rst_n, .amp(DW'(2 ** (DW - 1) - 1)), .phase(gphase), .cos_o(cx), .sin_o(sx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc <= '0;
      ps <= '0;
      y  <= '0;
    end else begin
      pc <= c_in * cx;
      ps <= s_in * sx;
      y  <= DW'(sum >>> (DW - 1));
    end
  end

  // |cos(theta - x)| <= 1, so the scaled sum fits in DW bits.
  assign sum = (2*DW+1)'(pc) + (2*DW+1)'(ps);
endmodule
