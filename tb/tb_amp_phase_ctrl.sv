// tb_amp_phase_ctrl: closes the cavity loop through a cavity model that scales
// the drive by 0.5 and delays it by 7 samples. Open loop: the measured amplitude
// must be half the pickup amplitude (0.25 x drive), and a step of the open-loop
// phase must move the measured phase by the same amount. Closed loop: amplitude
// and phase must settle on their set points; with an unreachable amplitude set
// point the drive must sit at the limit; switching RF off silences the DAC. Means over 500 clocks are compared.
module tb_amp_phase_ctrl;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] adc_cav, dac_cav, drive_amp, drive_phase;
  logic [31:0] ftw;
  pid_cfg_t amp_cfg, pha_cfg;
  rf_cfg_t rf_cfg;
  logic rf_gate;
  logic [16:0] cav_amp;
  logic [15:0] cav_phase;
  int checks = 0, failures = 0;
  logic signed [15:0] dline [7];

  amp_phase_ctrl #(.DW(16), .PH_W(32), .ITER(16), .LPF_SHIFT(4)) dut (.*);
  always #5 clk = ~clk;

  // cavity model
  always @(posedge clk) begin
    dline[0] <= dac_cav;
    for (int k = 1; k < 7; k++) dline[k] <= dline[k-1];
  end
  assign adc_cav = dline[6] >>> 1;

  task automatic mean(output real a, output real p, input real pref);
    real d;
    a = 0.0; p = 0.0;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #1;
      a += real'(cav_amp);
      d = real'($signed(cav_phase - 16'(int'(pref))));
      p += d;
    end
    a /= 500.0;
    p = p / 500.0 + pref;
  endtask

  task automatic check(input bit ok, input string what, input real v);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %f (drive %0d / %0d)", what, v, drive_amp, drive_phase);
    end
  endtask

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, p, p0;
    foreach (dline[k]) dline[k] = 0;
    ftw = 32'd1518700436;
    amp_cfg = '0; pha_cfg = '0;
    rf_cfg = '{rf_on: 1'b1, pulse_mode: 1'b0, period: 32'd0, width: 32'd0};
    amp_cfg.open_val = 16'sd20000; amp_cfg.limit = 16'd30000;
    amp_cfg.kp = 16'd64; amp_cfg.ki = 16'd4;
    pha_cfg.limit = 16'd32767; pha_cfg.kp = 16'd64; pha_cfg.ki = 16'd2;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (1000) @(posedge clk);
    mean(a, p0, 0.0);
    check(a > 4950.0 && a < 5050.0, "open-loop amplitude 5000", a);
    pha_cfg.open_val = 16'sd8192;   // +45 degrees
    repeat (500) @(posedge clk);
    mean(a, p, p0 + 8192.0);
    check(p - p0 > 8192.0 - 30.0 && p - p0 < 8192.0 + 30.0, "open-loop phase step", p - p0);
    // close both loops
    amp_cfg.setpoint = 16'sd6000;
    pha_cfg.setpoint = 16'sd4000;
    amp_cfg.closed = 1; pha_cfg.closed = 1;
    repeat (6000) @(posedge clk);
    mean(a, p, 4000.0);
    check(a > 5970.0 && a < 6030.0, "closed-loop amplitude", a);
    check(p > 3970.0 && p < 4030.0, "closed-loop phase", p);
    pha_cfg.setpoint = -16'sd12000;
    repeat (6000) @(posedge clk);
    mean(a, p, -12000.0);
    check(p > -12030.0 && p < -11970.0, "phase set-point change", p);
    check(a > 5970.0 && a < 6030.0, "amplitude held", a);
    amp_cfg.setpoint = 16'sd9000; amp_cfg.limit = 16'd30000;
    amp_cfg.setpoint = 16'sd12000;  // needs drive 48000
    repeat (3000) @(posedge clk); #1;
    check(drive_amp == 16'sd30000, "drive at limit", real'(drive_amp));
    rf_cfg.rf_on = 0;
    repeat (10) @(posedge clk); #1;
    check(dac_cav == 0 && !rf_gate, "RF off silences the drive", real'(dac_cav));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
