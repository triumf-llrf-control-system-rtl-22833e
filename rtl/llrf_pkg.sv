// llrf_pkg: types and constants shared by the LLRF firmware.
//
// The firmware works on 16-bit signed samples and on 32-bit phase words in which
// 2^32 is one full turn. Neither width is given by the design description; both are
// this implementation's choice. The config and status structs stand for the
// registers the CPU reaches through its GPIO blocks: the grouping follows the
// controls the description names (set points, open-loop drives, PID gains, global
// phase, harmonic ratio, motor frequency/duty/mode/polarities), the field widths
// and layout are this implementation's own.
package llrf_pkg;

  localparam int unsigned DW   = 16;  // sample width
  localparam int unsigned PH_W = 32;  // phase / frequency word width

  // Nominal frequency word of 35.36 MHz for an assumed 100 MHz sample clock:
  // round(35.36e6 / 100e6 * 2^32).
  localparam logic [PH_W-1:0] FTW_35M36 = 32'd1518700436;

  // Operation modes of the step-motor controller.
  typedef enum logic [1:0] {
    MOTOR_MANUAL       = 2'd0,  // limits ignored
    MOTOR_SINGLE_HOLD  = 2'd1,  // no motion further into an active limit
    MOTOR_AUTO_REVERSE = 2'd2   // reverse direction on reaching a limit
  } motor_mode_e;

  typedef struct packed {
    logic [31:0]  period;      // clocks per step pulse (sets the frequency)
    logic [31:0]  high_time;   // clocks the pulse is high (sets the duty factor)
    motor_mode_e  mode;
    logic         run;         // enable motion
    logic         dir_up;      // commanded direction, 1 = up
    logic         up_lim_inv;  // 1: up limit pin is active low
    logic         dn_lim_inv;  // 1: down limit pin is active low
    logic         en_inv;      // 1: driver enable pin is active low
    logic         cnt_clear;   // clear the position counter
  } motor_cfg_t;

  typedef struct packed {
    logic signed [31:0] position;  // up pulses minus down pulses
    logic         up_limit;        // active up limit (after polarity)
    logic         down_limit;      // active down limit (after polarity)
    logic         moving;          // pulses are being produced
    logic         dir_up;          // present direction
  } motor_status_t;

  typedef struct packed {
    logic [DW-1:0] kp, ki, kd;     // gains, unsigned
    logic [DW-1:0] limit;          // output magnitude limit, unsigned
    logic          closed;         // 1 = closed loop, 0 = open loop
    logic signed [DW-1:0] setpoint;
    logic signed [DW-1:0] open_val; // open-loop drive
  } pid_cfg_t;

  typedef struct packed {
    logic [PH_W-1:0] ftw_center;   // start frequency of a Costas loop
    logic [DW-1:0]   kp, ki;       // loop-filter gains
  } pll_cfg_t;

  typedef struct packed {
    logic        rf_on;        // 0: drive switched off
    logic        pulse_mode;   // 1: pulse mode, 0: CW
    logic [31:0] period;       // pulse repetition period in clocks
    logic [31:0] width;        // RF-on time per period in clocks
  } rf_cfg_t;

  typedef struct packed {
    pll_cfg_t        pll1, pll2;
    rf_cfg_t         rf;             // RF on/off and pulse/CW mode
    logic [PH_W-1:0] global_phase;   // global phase x
    logic [7:0]      harmonic;       // integer ratio output / reference frequency
    pid_cfg_t        amp, pha;       // amplitude and phase loops
    logic signed [DW-1:0] a_ref;     // amplitude of the ISAC II reference output
    logic [PH_W-1:0] p_ref;          // phase of the ISAC II reference output
    motor_cfg_t      motor;
  } llrf_cfg_t;

  typedef struct packed {
    logic [PH_W-1:0]      pll1_f, pll2_f;   // loop filter outputs (frequency words)
    logic signed [DW-1:0] pll1_pd, pll2_pd; // phase detector outputs
    logic [DW:0]          cav_amp;          // cavity amplitude R
    logic [DW-1:0]        cav_phase;        // cavity phase Theta (top bits of the turn)
    logic signed [DW-1:0] drive_amp;        // amplitude loop output
    logic signed [DW-1:0] drive_phase;      // phase loop output (LLRF output phase)
    logic                 rf_gate;          // drive presently switched on
    motor_status_t        motor;
  } llrf_status_t;

endpackage
