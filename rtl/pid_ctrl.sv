// pid_ctrl: set-point comparison, PID controller, output limit and open/closed
// loop switch of one cavity loop (amplitude or phase).
//
// e = setpoint - meas (modulo 2^DW, so a phase error wraps correctly across
// +-180 degrees). In closed loop
//   u = clamp( (kp*e + I + kd*(e - e_prev)) / 2^GAIN_SHIFT, -limit, +limit ),
//   I += ki*e, held while u is at the limit (anti-windup).
// In open loop u = open_val and the integrator and derivative memory are cleared,
// so closing the loop starts from a clean state. kp, ki, kd and limit are
// unsigned run-time words. The set point, PID, limit, open-loop drive and switch
// follow the description; the fixed-point format and anti-windup rule are this
// implementation's choice. u follows e by 2 clocks.
module pid_ctrl #(
  parameter int unsigned DW         = 16,
  parameter int unsigned GAIN_SHIFT = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] setpoint,
  input  logic signed [DW-1:0] meas,
  input  logic [DW-1:0]        kp,
  input  logic [DW-1:0]        ki,
  input  logic [DW-1:0]        kd,
  input  logic [DW-1:0]        limit,
  input  logic                 closed,
  input  logic signed [DW-1:0] open_val,
  output logic signed [DW-1:0] e,
  output logic signed [DW-1:0] u
);
  localparam int unsigned AW = 2 * DW + GAIN_SHIFT + 4;

  logic signed [DW-1:0] e_prev;
  logic signed [AW-1:0] integ, integ_next, sum, lim_s;
  logic signed [DW:0]   de;
  logic                 sat_hi, sat_lo;

  always_ff @(posedge clk) begin
    if (!rst_n) e <= '0;
    else        e <= setpoint - meas;
  end

  assign de         = (DW+1)'(e) - (DW+1)'(e_prev);
  assign integ_next = integ + AW'(e * $signed({1'b0, ki}));
  assign sum = AW'(e * $signed({1'b0, kp})) + integ + AW'(de * $signed({1'b0, kd}));
  assign lim_s  = AW'($signed({1'b0, limit})) <<< GAIN_SHIFT;
  assign sat_hi = sum > lim_s;
  assign sat_lo = sum < -lim_s;

  always_ff @(posedge clk) begin
    if (!rst_n || !closed) begin
      integ  <= '0;
      e_prev <= '0;
    end else begin
      e_prev <= e;
      if (!((sat_hi && e > 0) || (sat_lo && e < 0))) integ <= integ_next;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       u <= '0;
    else if (!closed) u <= open_val;
    else if (sat_hi)  u <= $signed(limit);
    else if (sat_lo)  u <= -$signed(limit);
    else              u <= DW'(sum >>> GAIN_SHIFT);
  end
endmodule
