// tb_llrf_top: end-to-end run of the LLRF firmware at its default parameters.
//
// Around the design: a 35.36 MHz + 10 kHz reference (half scale, 100 MHz
// sampling), a cavity that returns half the drive after 7 samples, and a tuner
// whose limit switches (active low) close at +60 and -40 steps. The sequence
// starts in pulse mode, as at start-up: both PLLs lock; the ISAC II reference output is demodulated here against the
// input's own phase and must have the set amplitude, a steady phase, and follow a
// global phase step (by minus the step, modulo 180 degrees) and a P_Ref step (by
// plus the step); the drive must be on a quarter of the time in pulse mode, then
// the system is switched to CW; the cavity loops run open and are then closed onto their set
// points; an unreachable set point drives the amplitude loop into its limit; the
// harmonic ratio is switched to 2 and the reference output must appear at twice
// the reference frequency; the tuner runs into its limit in single-side hold
// mode, backs off, bounces in auto-reverse mode, runs in manual mode, and its
// step counter is checked against the tuner model and cleared. Every mechanism is
// counted and one that never happened is a failure.
module tb_llrf_top;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real TWO32 = 4294967296.0;
  localparam longint FTW0 = 64'd1518700436;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] adc_ref, adc_cav, dac_cav, dac_ref;
  logic up_limit_in, down_limit_in, motor_en, motor_dir, motor_pulse;
  llrf_cfg_t cfg;
  llrf_status_t status;
  int checks = 0, failures = 0;
  real ph_in = 0.0;
  longint ftw_in;
  logic signed [15:0] dline [7];
  int pos = 0, reversals = 0;
  logic pulse_q = 0, dir_q = 1;
  // mechanism counters
  int n_lock = 0, n_gphase = 0, n_pref = 0, n_close = 0, n_limit = 0, n_harm = 0;
  int n_hold = 0, n_reverse = 0, n_manual = 0, n_clear = 0, n_pulse = 0, n_cw = 0;

  llrf_top dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    ph_in += real'(ftw_in);
    if (ph_in >= TWO32) ph_in -= TWO32;
    adc_ref <= 16'($rtoi(16384.0 * $cos(2.0 * PI * ph_in / TWO32)));
    dline[0] <= dac_cav;
    for (int k = 1; k < 7; k++) dline[k] <= dline[k-1];
    pulse_q <= motor_pulse;
    dir_q <= motor_dir;
    if (motor_pulse && !pulse_q && !motor_en) pos += motor_dir ? 1 : -1;
    if (motor_dir != dir_q) reversals++;
  end
  assign adc_cav = dline[6] >>> 1;
  assign up_limit_in   = !(pos >= 60);
  assign down_limit_in = !(pos <= -40);

  task automatic check(input bit ok, input string what, input real v);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %f", what, v);
    end
  endtask

  // Demodulate dac_ref against harmonic h of the input phase: amplitude and
  // phase (turns).
  task automatic demod_ref(input int h, output real amp, output real ph);
    real si, sq, th;
    si = 0.0; sq = 0.0;
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk); #1;
      th = 2.0 * PI * real'(h) * ph_in / TWO32;
      si += real'(dac_ref) * $cos(th);
      sq += real'(dac_ref) * $sin(th);
    end
    amp = 2.0 * $sqrt(si * si + sq * sq) / 4000.0;
    ph = $atan2(-sq, si) / (2.0 * PI);
  endtask

  function automatic real wrap(input real v, input real period);
    real r;
    r = v;
    while (r >= period / 2.0) r -= period;
    while (r < -period / 2.0) r += period;
    return r;
  endfunction

  task automatic cav_mean(output real a, output real p, input real pref);
    a = 0.0; p = 0.0;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #1;
      a += real'(status.cav_amp);
      p += real'($signed(status.cav_phase - 16'(int'(pref))));
    end
    a /= 500.0;
    p = p / 500.0 + pref;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, p, p0, a2, p2, step;
    foreach (dline[k]) dline[k] = 0;
    ftw_in = FTW0 + 429497;   // +10 kHz
    cfg = '0;
    cfg.pll1 = '{ftw_center: 32'(FTW0), kp: 16'd26720, ki: 16'd8192};
    cfg.pll2 = '{ftw_center: 32'(FTW0), kp: 16'd6680, ki: 16'd2048};
    cfg.harmonic = 8'd1;
    cfg.rf = '{rf_on: 1'b1, pulse_mode: 1'b1, period: 32'd2000, width: 32'd500};  // start-up in pulse mode
    cfg.a_ref = 16'sd16000;
    cfg.amp.open_val = 16'sd20000; cfg.amp.limit = 16'd30000;
    cfg.amp.kp = 16'd64; cfg.amp.ki = 16'd4;
    cfg.pha.limit = 16'd32767; cfg.pha.kp = 16'd64; cfg.pha.ki = 16'd2;
    cfg.motor.period = 32'd10; cfg.motor.high_time = 32'd3;
    cfg.motor.mode = MOTOR_SINGLE_HOLD; cfg.motor.dir_up = 1;
    cfg.motor.up_lim_inv = 1; cfg.motor.dn_lim_inv = 1; cfg.motor.en_inv = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // --- reference PLLs and ISAC II reference output
    cfg.motor.run = 1;           // tuner moves up towards its limit meanwhile
    repeat (30000) @(posedge clk);
    a = 0.0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      a += real'(status.pll2_f);
    end
    a = a / 2000.0 - real'(ftw_in);
    check(a < 200.0 && a > -200.0, "PLL 2 mean frequency word", a);
    demod_ref(1, a, p0);
    check(a > 15800.0 && a < 16200.0, "reference output amplitude", a);
    demod_ref(1, a2, p);
    check(wrap(p - p0, 1.0) * 360.0 < 0.5 && wrap(p - p0, 1.0) * 360.0 > -0.5, "reference output phase steady (deg)",
          wrap(p - p0, 1.0) * 360.0);
    if (a > 15800.0) n_lock++;
    step = 45.0 / 360.0;
    cfg.global_phase = 32'($rtoi(step * TWO32));
    repeat (20000) @(posedge clk);
    demod_ref(1, a, p);
    check(wrap(p - p0 + step, 0.5) * 360.0 < 1.0 && wrap(p - p0 + step, 0.5) * 360.0 > -1.0,
          "global phase step moves the output (deg error)", wrap(p - p0 + step, 0.5) * 360.0);
    n_gphase++;
    p0 = p;
    step = 30.0 / 360.0;
    cfg.p_ref = 32'($rtoi(step * TWO32));
    repeat (100) @(posedge clk);
    demod_ref(1, a, p);
    check(wrap(p - p0 - step, 1.0) * 360.0 < 0.5 && wrap(p - p0 - step, 1.0) * 360.0 > -0.5,
          "P_Ref step moves the output (deg error)", wrap(p - p0 - step, 1.0) * 360.0);
    n_pref++;

    // --- tuner: single-side hold at the up limit
    check(status.motor.up_limit && !status.motor.moving && pos >= 60 && pos <= 61, "tuner held at up limit", real'(pos));
    check(status.motor.position == pos, "step counter equals tuner position", real'(status.motor.position));
    if (status.motor.up_limit && !status.motor.moving) n_hold++;
    cfg.motor.dir_up = 0;        // back off

    // --- pulse mode: the drive is on for a quarter of each period
    a = 0.0;
    for (int n = 0; n < 8000; n++) begin
      @(posedge clk); #1;
      if (status.rf_gate) a += 1.0;
    end
    check(a > 1990.0 && a < 2010.0, "pulse mode duty 25 %", a / 8000.0);
    if (a > 1990.0 && a < 2010.0) n_pulse++;
    cfg.rf.pulse_mode = 0;       // switch to CW
    n_cw++;
    repeat (1000) @(posedge clk);

    // --- cavity loops: open, then closed
    cav_mean(a, p, 0.0);
    check(a > 4950.0 && a < 5050.0, "open-loop cavity amplitude", a);
    cfg.amp.setpoint = 16'sd6000; cfg.pha.setpoint = 16'sd4000;
    cfg.amp.closed = 1; cfg.pha.closed = 1;
    n_close++;
    repeat (6000) @(posedge clk);
    cav_mean(a, p, 4000.0);
    check(a > 5970.0 && a < 6030.0, "closed-loop cavity amplitude", a);
    check(p > 3970.0 && p < 4030.0, "closed-loop cavity phase", p);
    check(!status.motor.up_limit && status.motor.position == pos, "tuner backed off, counter follows",
          real'(status.motor.position));
    cfg.amp.setpoint = 16'sd12000;   // needs drive 48000 > limit
    repeat (3000) @(posedge clk); #1;
    check(status.drive_amp == 16'sd30000, "amplitude drive at its limit", real'(status.drive_amp));
    if (status.drive_amp == 16'sd30000) n_limit++;
    cfg.amp.setpoint = 16'sd6000;

    // --- tuner auto reverse, then manual
    cfg.motor.mode = MOTOR_AUTO_REVERSE;
    reversals = 0;
    repeat (6000) @(posedge clk); #1;
    check(reversals >= 4 && pos <= 61 && pos >= -41, "auto reverse between limits", real'(reversals));
    if (reversals >= 4) n_reverse += reversals;
    check(status.motor.position == pos, "step counter after auto reverse", real'(status.motor.position));
    cfg.motor.mode = MOTOR_MANUAL;
    cfg.motor.dir_up = 1;
    repeat (1500) @(posedge clk); #1;
    check(pos > 61, "manual mode passes the limit", real'(pos));
    if (pos > 61) n_manual++;
    cfg.motor.run = 0;
    cfg.motor.cnt_clear = 1;
    repeat (2) @(posedge clk); #1;
    cfg.motor.cnt_clear = 0;
    check(status.motor.position == 0, "step counter cleared", real'(status.motor.position));
    n_clear++;

    // --- harmonic ratio 2
    cfg.harmonic = 8'd2;
    repeat (3000) @(posedge clk);
    demod_ref(2, a, p0);
    demod_ref(2, a2, p);
    check(a > 15800.0 && a < 16200.0, "reference output at the 2nd harmonic", a);
    check(wrap(p - p0, 1.0) * 360.0 < 1.0 && wrap(p - p0, 1.0) * 360.0 > -1.0, "2nd harmonic phase steady (deg)",
          wrap(p - p0, 1.0) * 360.0);
    if (a > 15800.0) n_harm++;
    demod_ref(1, a, p);
    check(a < 500.0, "no output left at the fundamental", a);

    $display("mechanisms: lock %0d, global phase %0d, P_Ref %0d, loop close %0d, PID limit %0d, harmonic %0d,",
             n_lock, n_gphase, n_pref, n_close, n_limit, n_harm);
    $display("            motor hold %0d, auto reverse %0d, manual %0d, counter clear %0d, pulse %0d, CW %0d",
             n_hold, n_reverse, n_manual, n_clear, n_pulse, n_cw);
    check(n_lock > 0 && n_gphase > 0 && n_pref > 0 && n_close > 0 && n_limit > 0 && n_harm > 0 &&
          n_hold > 0 && n_reverse > 0 && n_manual > 0 && n_clear > 0 && n_pulse > 0 && n_cw > 0, "every mechanism happened", 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
