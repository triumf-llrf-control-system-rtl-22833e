// motor_pulse_gen: step/direction generator of the tuner motor controller.
//
// While run is set and motion is allowed, a counter repeats every `period`
// clocks and the step output is high for the first `high_time` clocks of each
// period, so the CPU sets the step frequency (f_clk / period) and the duty factor
// (high_time / period). The limit inputs are already synchronised and
// polarity-corrected. The three modes:
//   MANUAL       - limits are ignored;
//   SINGLE_HOLD  - an active limit in the present direction stops the pulses,
//                  the opposite direction still runs;
//   AUTO_REVERSE - an active limit in the present direction flips the direction
//                  and motion continues.
// The present direction follows dir_up whenever dir_up changes (and at reset);
// in AUTO_REVERSE it is then flipped by the limits. A blocked or stopped motor
// restarts its period at zero. Periods below 2 are treated as 2. Modes, frequency,
// duty factor and enable follow the description; the counter scheme is this
// implementation's.
module motor_pulse_gen
  import llrf_pkg::motor_mode_e, llrf_pkg::MOTOR_MANUAL, llrf_pkg::MOTOR_SINGLE_HOLD,
         llrf_pkg::MOTOR_AUTO_REVERSE;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] period,
  input  logic [CNT_W-1:0] high_time,
  input  motor_mode_e      mode,
  input  logic             run,
  input  logic             dir_up,
  input  logic             up_limit,
  input  logic             down_limit,
  output logic             en,
  output logic             dir,
  output logic             pulse,
  output logic             moving
);
  logic [CNT_W-1:0] cnt, per;
  logic             dir_cmd_q;
  logic             hit;      // active limit in the present direction

  assign per = (period < CNT_W'(2)) ? CNT_W'(2) : period;
  assign hit = dir ? up_limit : down_limit;

  always_comb begin
    unique case (mode)
      MOTOR_MANUAL:       moving = run;
      MOTOR_SINGLE_HOLD:  moving = run && !hit;
      MOTOR_AUTO_REVERSE: moving = run && !hit;
      default:            moving = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dir       <= dir_up;
      dir_cmd_q <= dir_up;
      cnt       <= '0;
      pulse     <= 1'b0;
      en        <= 1'b0;
    end else begin
      dir_cmd_q <= dir_up;
      en        <= run;
      if (dir_up != dir_cmd_q) dir <= dir_up;
      else if (mode == MOTOR_AUTO_REVERSE && run && hit) dir <= !dir;

      if (moving) begin
        cnt   <= (cnt >= per - 1) ? '0 : cnt + 1'b1;
        pulse <= cnt < high_time;
      end else begin
        cnt   <= '0;
        pulse <= 1'b0;
      end
    end
  end

  // In single-side hold mode no step is issued into an active limit.
  a_hold_stops: assert property (@(posedge clk) disable iff (!rst_n)
    (mode == MOTOR_SINGLE_HOLD && hit) |=> !pulse);
endmodule
