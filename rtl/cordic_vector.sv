// cordic_vector: pipelined vectoring-mode CORDIC, I/Q to amplitude R and phase
// Theta (the "CORDIC" block of the cavity loop, R = sqrt(I^2+Q^2),
// Theta = atan2(Q, I)).
//
// A first stage folds vectors with negative I by 180 degrees, then ITER
// micro-rotations drive Q to zero while accumulating the angle. The remaining I,
// which is K = 1.6468 times the magnitude, is multiplied by 1/K in a last stage.
// Theta is a PH_W-bit fraction of a turn; R is an unsigned DW+1-bit number on the
// same scale as the inputs. Outputs follow inputs by ITER + 2 clocks, one input per
// clock. The description names the block and its ports (x, y, R, Theta); the
// pipeline and word widths are this implementation's choice.
module cordic_vector #(
  parameter int unsigned DW   = 16,
  parameter int unsigned PH_W = 32,
  parameter int unsigned ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] x,
  input  logic signed [DW-1:0] y,
  output logic [DW:0]          mag,
  output logic [PH_W-1:0]      theta
);
  localparam int unsigned GB = 3;       // fractional guard bits
  localparam int unsigned IW = DW + 4 + GB;  // sign, sqrt(2) and K growth, guard

  function automatic logic [PH_W-1:0] atan_turn(input int i);
    real a;
    a = $atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979323846);
    return PH_W'(longint'(a * (2.0 ** PH_W) + 0.5));
  endfunction

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic [PH_W-1:0]      zs [ITER+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else if (x < 0) begin
      xs[0] <= -(IW'(x) <<< GB);
      ys[0] <= -(IW'(y) <<< GB);
      zs[0] <= {1'b1, {(PH_W-1){1'b0}}};  // 180 degrees
    end else begin
      xs[0] <= IW'(x) <<< GB;
      ys[0] <= IW'(y) <<< GB;
      zs[0] <= '0;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic [PH_W-1:0] ATAN = atan_turn(i);
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
      end else if (ys[i] >= 0) begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN;
      end else begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN;
      end
    end
  end

  // Gain correction and guard-bit removal: R = x_n * 39797 / 2^(16+GB).
  logic [IW+16:0] prod;
  assign prod = (IW+17)'($unsigned(xs[ITER])) * (IW+17)'(39797);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mag   <= '0;
      theta <= '0;
    end else begin
      mag   <= (DW+1)'((prod + ((IW+17)'(1) << (15 + GB))) >> (16 + GB));
      theta <= zs[ITER];
    end
  end
endmodule
