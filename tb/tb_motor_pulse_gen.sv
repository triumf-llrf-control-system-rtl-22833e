// tb_motor_pulse_gen: checks the step period and duty factor (edges every
// `period` clocks, high for `high_time` clocks), and the three modes: manual
// ignores the limits, single-side hold stops at a limit in the present direction
// but runs away from it, auto reverse flips direction at a limit and keeps
// stepping.
module tb_motor_pulse_gen;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] period, high_time;
  motor_mode_e mode;
  logic run, dir_up, up_limit, down_limit, en, dir, pulse, moving;
  int checks = 0, failures = 0;
  int rises = 0, highs = 0, last_rise = 0, cyc = 0, bad_period = 0;
  logic pulse_q = 0;

  motor_pulse_gen #(.CNT_W(32)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    pulse_q <= pulse;
    if (pulse) highs++;
    if (pulse && !pulse_q) begin
      if (rises > 0 && cyc - last_rise != int'(period)) bad_period++;
      rises++;
      last_rise = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (rises %0d highs %0d dir %0d)", what, rises, highs, dir);
    end
  endtask

  task automatic count_window(input int n);
    rises = 0; highs = 0; bad_period = 0;
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    period = 32'd20; high_time = 32'd5; mode = MOTOR_SINGLE_HOLD;
    run = 0; dir_up = 1; up_limit = 0; down_limit = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    count_window(100);
    check(rises == 0 && !en, "idle when not running");
    run = 1;
    count_window(1000);
    check(rises == 50 && highs == 250 && bad_period == 0, "period 20, duty 25 %");
    check(en && dir, "enable and direction up");
    period = 32'd8; high_time = 32'd4;
    count_window(16);
    count_window(800);
    check(rises == 100 && highs == 400 && bad_period == 0, "period 8, duty 50 %");
    // single-side hold
    up_limit = 1;
    count_window(3);
    count_window(200);
    check(rises == 0 && !moving && dir, "hold at up limit");
    dir_up = 0;
    count_window(200);
    check(rises == 25 && !dir, "runs down away from up limit");
    up_limit = 0;
    // manual mode ignores limits
    mode = MOTOR_MANUAL; down_limit = 1;
    count_window(200);
    check(rises == 25 && moving, "manual ignores limit");
    // auto reverse: down limit active, direction flips to up
    mode = MOTOR_AUTO_REVERSE;
    count_window(10);
    check(dir, "auto reverse flips to up");
    down_limit = 0;
    count_window(200);
    check(rises == 25 && dir, "keeps moving after reverse");
    up_limit = 1;
    count_window(10);
    check(!dir, "auto reverse flips to down");
    up_limit = 0;
    run = 0;
    count_window(3);
    count_window(100);
    check(rises == 0 && !en, "stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
