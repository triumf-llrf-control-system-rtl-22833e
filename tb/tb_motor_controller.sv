// tb_motor_controller: drives the controller against a tuner model. The model
// keeps its own position from the step and direction pins and closes an up
// limit switch at +60 steps and a down switch at -40 steps; the switch pins are
// active low here and the driver enable pin is active low, so the polarity
// settings are exercised. Checks: the step counter equals the model's position,
// the motor stops at the up limit in single-side hold mode and can leave it
// downwards, auto reverse bounces between the limits, the enable pin polarity,
// and clearing the counter.
module tb_motor_controller;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0;
  motor_cfg_t cfg;
  logic up_limit_in, down_limit_in, en_out, dir_out, pulse_out;
  motor_status_t status;
  int checks = 0, failures = 0;
  int pos = 0, reversals = 0;
  logic pulse_q = 0, dir_q = 1;

  motor_controller #(.CNT_W(32)) dut (.*);
  always #5 clk = ~clk;

  // tuner model: switches are active low
  always @(posedge clk) begin
    pulse_q <= pulse_out;
    dir_q   <= dir_out;
    if (pulse_out && !pulse_q && !en_out) pos += dir_out ? 1 : -1;
    if (dir_out != dir_q) reversals++;
  end
  assign up_limit_in   = !(pos >= 60);
  assign down_limit_in = !(pos <= -40);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pos %0d count %0d", what, pos, status.position);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.period = 32'd10; cfg.high_time = 32'd3; cfg.mode = MOTOR_SINGLE_HOLD;
    cfg.dir_up = 1; cfg.up_lim_inv = 1; cfg.dn_lim_inv = 1; cfg.en_inv = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk); #1;
    check(en_out == 1'b1, "enable pin inactive (high) when stopped");
    cfg.run = 1;
    repeat (5) @(posedge clk); #1;
    check(en_out == 1'b0, "enable pin active low when running");
    repeat (2000) @(posedge clk); #1;
    check(status.up_limit && !status.moving, "held at up limit");
    check(pos >= 60 && pos <= 61, "stopped at the switch");
    check(status.position == pos, "counter equals position (up)");
    cfg.dir_up = 0;
    repeat (300) @(posedge clk); #1;
    check(!status.up_limit && status.moving, "leaves the limit downwards");
    check(status.position == pos, "counter equals position (down)");
    cfg.mode = MOTOR_AUTO_REVERSE;
    reversals = 0;
    repeat (6000) @(posedge clk); #1;
    check(reversals >= 4, "auto reverse bounces between limits");
    check(pos <= 61 && pos >= -41, "stays between the limits");
    check(status.position == pos, "counter equals position (auto)");
    cfg.cnt_clear = 1;
    @(posedge clk); #1;
    cfg.cnt_clear = 0;
    @(posedge clk); #1;
    check(status.position == 0 || status.position == 1 || status.position == -1, "counter clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
