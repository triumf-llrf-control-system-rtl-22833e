// tb_costas_pll: a half-scale cosine at 35.36 MHz + 20 kHz (100 MHz sample clock)
// is applied with the loop starting at the 35.36 MHz word; later the input jumps
// to 35.36 MHz - 50 kHz. After each lock time the loop must hold: the mean of f
// within 200 counts (5 Hz) of the input's frequency word, the filtered Q within 2 degrees
// of zero relative to I (phase error), |I| near A/2, and the phase detector output
// near zero. The input is made here from a floating-point phase.
module tb_costas_pll;
  localparam real PI = 3.14159265358979;
  localparam longint FTW0 = 64'd1518700436;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x, nco_cos, nco_sin, pd, i_lp, q_lp;
  logic [31:0] ftw_center, f, nco_phase;
  logic [15:0] kp, ki;
  int checks = 0, failures = 0;
  real ph_in = 0.0;
  longint ftw_in;
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  costas_pll #(.DW(16), .PH_W(32), .ITER(16), .LPF_SHIFT(4), .KP_SHIFT(4), .KI_SHIFT(12)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    ph_in += real'(ftw_in);
    if (ph_in >= 4294967296.0) ph_in -= 4294967296.0;
    x <= 16'($rtoi(16384.0 * $cos(2.0 * PI * ph_in / 4294967296.0)));
  end

  task automatic check_lock(input string tag);
    real fsum;
    int qmax;
    fsum = 0.0;
    qmax = 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      fsum += real'(f);
    end
    checks++;
    if (rabs(fsum / 2000.0 - real'(ftw_in)) > 200.0) begin
      failures++;
      $display("%s: mean f %f, input %0d", tag, fsum / 2000.0, ftw_in);
    end
    checks++;
    if (rabs(real'(q_lp)) > 0.035 * rabs(real'(i_lp)) || rabs(real'(i_lp)) < 7000.0) begin
      failures++;
      $display("%s: I %0d Q %0d", tag, i_lp, q_lp);
    end
    checks++;
    if (pd > 100 || pd < -100) begin
      failures++;
      $display("%s: pd %0d", tag, pd);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ftw_in = FTW0 + 858993;   // +20 kHz
    ftw_center = 32'(FTW0);
    kp = 16'd26720;
    ki = 16'd8192;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20000) @(posedge clk);
    check_lock("+20 kHz");
    ftw_in = FTW0 - 2147484;  // -50 kHz
    repeat (30000) @(posedge clk);
    check_lock("-50 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
