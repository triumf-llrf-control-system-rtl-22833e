// tb_global_phase_shifter: holds random (theta, x) pairs and full-scale
// cos/sin(theta) inputs; after the pipeline has filled the output must be
// 32767*cos(theta - x) within 6 LSB. A second phase runs a rotating theta and
// checks the delay of 2 clocks from the I/Q inputs.
module tb_global_phase_shifter;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] c_in, s_in, y;
  logic [31:0] gphase;
  int checks = 0, failures = 0;
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  global_phase_shifter #(.DW(16), .PH_W(32), .ITER(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, xr, e;
    real hist [$];
    c_in = 0; s_in = 0; gphase = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 200; k++) begin
      th = 2.0 * PI * real'($urandom) / 4294967296.0;
      gphase = (k == 0) ? 32'h4000_0000 : $urandom;  // 90 degrees first
      xr = 2.0 * PI * real'(gphase) / 4294967296.0;
      c_in = 16'($rtoi(32767.0 * $cos(th)));
      s_in = 16'($rtoi(32767.0 * $sin(th)));
      repeat (22) @(posedge clk);
      #1;
      e = 32767.0 * $cos(th - xr);
      checks++;
      if (rabs(real'(y) - e) > 6.0) begin
        failures++;
        if (failures < 10) $display("k=%0d got %0d exp %f", k, y, e);
      end
    end
    // rotating input, fixed x = 0: y must be the cos input delayed by 2 clocks
    gphase = 0;
    repeat (25) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      th = 2.0 * PI * 0.0371 * n;
      c_in <= 16'($rtoi(32767.0 * $cos(th)));
      s_in <= 16'($rtoi(32767.0 * $sin(th)));
      hist.push_back(32767.0 * $cos(th));
      @(posedge clk); #1;
      if (hist.size() >= 2) begin
        e = hist.pop_front();
        checks++;
        if (rabs(real'(y) - e) > 6.0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
