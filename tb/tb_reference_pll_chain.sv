// tb_reference_pll_chain: a half-scale reference at 35.36 MHz + 10 kHz. Both
// PLLs must lock (mean frequency words within 200 counts of the input's); the
// phase of PLL 2's NCO relative to the input is measured, the global phase is
// stepped by +60 and then -100 degrees, and each time the relative phase must move
// by minus that step (modulo 180 degrees, the Costas ambiguity) within 1 degree.
module tb_reference_pll_chain;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam longint FTW0 = 64'd1518700436;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] adc_ref, pd1, pd2;
  pll_cfg_t pll1_cfg, pll2_cfg;
  logic [31:0] global_phase, f1, f2, nco1_phase, nco2_phase;
  int checks = 0, failures = 0;
  real ph_in = 0.0;
  longint ftw_in;
  logic [31:0] ph_in_q;

  reference_pll_chain #(.DW(16), .PH_W(32), .ITER(16), .LPF_SHIFT(4), .KP_SHIFT(4),
                        .KI_SHIFT(12)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    ph_in += real'(ftw_in);
    if (ph_in >= 4294967296.0) ph_in -= 4294967296.0;
    adc_ref <= 16'($rtoi(16384.0 * $cos(2.0 * PI * ph_in / 4294967296.0)));
  end

  // mean relative phase (turns, modulo 1/2) and mean frequency words
  task automatic measure(output real rel, output real mf1, output real mf2);
    real s, c, d;
    s = 0.0; c = 0.0; mf1 = 0.0; mf2 = 0.0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      d = (real'(nco2_phase) - ph_in) / 4294967296.0;
      s += $sin(4.0 * PI * d);
      c += $cos(4.0 * PI * d);
      mf1 += real'(f1);
      mf2 += real'(f2);
    end
    rel = $atan2(s, c) / (4.0 * PI);
    mf1 /= 2000.0;
    mf2 /= 2000.0;
  endtask

  function automatic real wrap_half(input real v);  // to [-0.25, 0.25)
    real r;
    r = v;
    while (r >= 0.25) r -= 0.5;
    while (r < -0.25) r += 0.5;
    return r;
  endfunction

  task automatic check(input bit ok, input string what, input real v);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %f", what, v);
    end
  endtask

  initial begin
    #8000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r0, r1, m1, m2, step;
    ftw_in = FTW0 + 429497;
    pll1_cfg = '{ftw_center: 32'(FTW0), kp: 16'd26720, ki: 16'd8192};
    pll2_cfg = '{ftw_center: 32'(FTW0), kp: 16'd6680, ki: 16'd2048};
    global_phase = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (30000) @(posedge clk);
    measure(r0, m1, m2);
    check(m1 - real'(ftw_in) < 200.0 && real'(ftw_in) - m1 < 200.0, "PLL 1 frequency", m1 - real'(ftw_in));
    check(m2 - real'(ftw_in) < 200.0 && real'(ftw_in) - m2 < 200.0, "PLL 2 frequency", m2 - real'(ftw_in));
    for (int k = 0; k < 2; k++) begin
      step = (k == 0) ? 60.0 / 360.0 : -100.0 / 360.0;
      global_phase = global_phase + 32'($rtoi(step * 4294967296.0));
      repeat (20000) @(posedge clk);
      measure(r1, m1, m2);
      check(wrap_half((r1 - r0) + step) * 360.0 < 1.0 && wrap_half((r1 - r0) + step) * 360.0 > -1.0,
            "relative phase follows -global phase (deg error)", wrap_half((r1 - r0) + step) * 360.0);
      r0 = r1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
