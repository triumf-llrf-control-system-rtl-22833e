// tb_lowpass_iir: step response and rejection of a fast tone. After a step of
// size S the output must be S(1 - (1 - 2^-SHIFT)^n) within 2 LSB at every clock,
// settle to S within 1 LSB, and a +-8000 alternating input must leave at most 300
// of ripple.
module tb_lowpass_iir;
  localparam int SHIFT = 4;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x, y;
  int checks = 0, failures = 0;

  lowpass_iir #(.DW(16), .SHIFT(SHIFT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, e;
    int mx, mn;
    x = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      int S;
      S = (k == 0) ? 10000 : (k == 1) ? -20000 : 32767;
      repeat (400) @(posedge clk);  // settle at previous value
      a = real'(y);
      x <= 16'(S);
      @(posedge clk);
      for (int n = 1; n <= 200; n++) begin
        @(posedge clk); #1;
        e = real'(S) + (a - real'(S)) * ((1.0 - 1.0 / (2.0 ** SHIFT)) ** (n + 1));
        checks++;
        if (y - e > 2.0 || e - y > 2.0) begin
          failures++;
          if (failures < 10) $display("step %0d n=%0d got %0d exp %f", S, n, y, e);
        end
      end
      repeat (300) @(posedge clk); #1;
      checks++;
      if (y > S + 1 || y < S - 1) failures++;
    end
    x <= 0;
    repeat (400) @(posedge clk);
    mx = -100000; mn = 100000;
    for (int n = 0; n < 400; n++) begin
      x <= (n % 2 == 0) ? 16'sd8000 : -16'sd8000;
      @(posedge clk); #1;
      if (n > 200) begin
        if (int'(y) > mx) mx = int'(y);
        if (int'(y) < mn) mn = int'(y);
      end
    end
    checks++;
    if (mx - mn > 600 || mx > 300 || mn < -300) begin
      failures++;
      $display("ripple %0d..%0d", mn, mx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
