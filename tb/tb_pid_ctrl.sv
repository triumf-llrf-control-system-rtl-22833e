// tb_pid_ctrl: exercises the loop switch and each term of the PID (gain scale
// 2^-8): open loop passes the open-loop drive; proportional output equals
// e*kp/256 two clocks after the inputs; the integral ramps by e*ki/256 per clock;
// a step in the measurement gives a one-clock derivative kick; the output is
// clamped to +-limit and leaves the limit at once when the error reverses
// (anti-windup); an error across +-180 degrees wraps.
module tb_pid_ctrl;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] setpoint, meas, open_val, e, u;
  logic [15:0] kp, ki, kd, limit;
  logic closed;
  int checks = 0, failures = 0;

  pid_ctrl #(.DW(16), .GAIN_SHIFT(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: e=%0d u=%0d", what, e, u);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int u0, u1;
    setpoint = 0; meas = 0; open_val = 0; kp = 0; ki = 0; kd = 0; limit = 16'd30000;
    closed = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // open loop
    for (int k = 0; k < 20; k++) begin
      open_val = 16'($urandom);
      setpoint = 16'($urandom);
      @(posedge clk); #1;
      check(u == open_val, "open loop value");
    end
    // proportional, gain 1 then 2
    closed = 1; kp = 16'd256;
    for (int k = 0; k < 50; k++) begin
      setpoint = 16'($urandom % 20000);
      meas = 16'($urandom % 20000);
      if (k == 25) kp = 16'd512;
      @(posedge clk); @(posedge clk); #1;
      check(int'(u) == ((int'(setpoint) - int'(meas)) * int'(kp)) / 256, "proportional");
    end
    // integral: e = 1000, ki = 64 -> 250 per clock
    kp = 0; ki = 16'd64; setpoint = 16'sd1000; meas = 0;
    closed = 0; @(posedge clk); #1 closed = 1;
    repeat (5) @(posedge clk); #1;
    u0 = u;
    repeat (40) @(posedge clk); #1;
    u1 = u;
    check(u1 - u0 == 40 * 250, "integral slope");
    // derivative kick
    closed = 0; ki = 0; kd = 16'd256; setpoint = 0; meas = 0;
    @(posedge clk); #1 closed = 1;
    repeat (4) @(posedge clk); #1;
    check(u == 0, "derivative idle");
    meas = -16'sd500;            // error steps +500
    @(posedge clk); @(posedge clk); #1;
    check(u == 16'sd500, "derivative kick");
    @(posedge clk); #1;
    check(u == 0, "derivative decays");
    // limit and anti-windup
    kd = 0; kp = 16'd256; ki = 16'd256; limit = 16'd2000; meas = 0; setpoint = 16'sd1500;
    repeat (50) @(posedge clk); #1;
    check(u == 16'sd2000, "positive limit");
    setpoint = -16'sd500;
    repeat (10) @(posedge clk); #1;
    check(u < 16'sd2000, "anti-windup release");
    setpoint = -16'sd6000;
    repeat (50) @(posedge clk); #1;
    check(u == -16'sd2000, "negative limit");
    // wrap-around of a phase error
    closed = 0; ki = 0; kp = 16'd256; limit = 16'd30000;
    @(posedge clk); #1 closed = 1;
    setpoint = 16'sd32000; meas = -16'sd32000;
    repeat (3) @(posedge clk); #1;
    check(u == -16'sd1536, "phase wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
