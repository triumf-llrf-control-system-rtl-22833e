// cordic_rotate: pipelined rotation-mode CORDIC, amplitude and angle to
// amp*cos(angle) and amp*sin(angle).
//
// It is the sine/cosine generator behind every NCO. The angle is a PH_W-bit
// fraction of a turn. A first stage folds angles in the second and third quadrants
// by 180 degrees (negating the vector) and pre-scales the amplitude by 1/K
// (K = 1.6468, the CORDIC gain), so no gain correction is needed after the
// ITER micro-rotations. Each micro-rotation is one register stage; the outputs
// follow the inputs by LATENCY = ITER + 2 clocks and a new input is taken every
// clock. The CORDIC structure itself is this implementation's choice: the design
// description uses an NCO core without saying how it makes its sine.
module cordic_rotate #(
  parameter int unsigned DW   = 16,
  parameter int unsigned PH_W = 32,
  parameter int unsigned ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] amp,
  input  logic [PH_W-1:0]      phase,
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o
);
  localparam int unsigned IW = DW + 3;  // guard bits for growth and rounding

  // atan(2^-i) as a fraction of a turn, scaled to 2^PH_W.
  function automatic logic [PH_W-1:0] atan_turn(input int i);
    real a;
    a = $atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979323846);
    return PH_W'(longint'(a * (2.0 ** PH_W) + 0.5));
  endfunction

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [PH_W-1:0] zs [ITER+1];

  // Stage 0: quadrant fold and 1/K pre-scale (1/K = 39797 / 2^16).
  logic signed [DW+17:0] scaled;
  logic [1:0] quad;
  assign scaled = amp * $signed(18'sd39797);
  assign quad = phase[PH_W-1 -: 2];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else begin
      // scaled >>> 16 fits in DW bits; keep 2 extra fractional bits
      if (quad == 2'b01 || quad == 2'b10) begin
        xs[0] <= -IW'(scaled >>> 14);
        zs[0] <= $signed(phase - {1'b1, {(PH_W-1){1'b0}}});
      end else begin
        xs[0] <= IW'(scaled >>> 14);
        zs[0] <= $signed(phase);
      end
      ys[0] <= '0;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic [PH_W-1:0] ATAN = atan_turn(i);
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
      end else if (zs[i] >= 0) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - $signed(ATAN);
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + $signed(ATAN);
      end
    end
  end

  // Output: drop the 2 fractional bits with rounding and saturate to DW bits.
  function automatic logic signed [DW-1:0] round_sat(input logic signed [IW-1:0] v);
    logic signed [IW-1:0] r;
    r = (v + IW'(2)) >>> 2;
    if (r > IW'(2 ** (DW - 1) - 1)) return DW'(2 ** (DW - 1) - 1);
    if (r < -IW'(2 ** (DW - 1))) return {1'b1, {(DW-1){1'b0}}};
    return DW'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      cos_o <= round_sat(xs[ITER]);
      sin_o <= round_sat(ys[ITER]);
    end
  end
endmodule
