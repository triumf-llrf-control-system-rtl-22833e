// tb_cordic_rotate: random amplitudes and angles into the rotation CORDIC, one
// per clock; each output pair is compared, exactly ITER+2 clocks later, with
// amp*cos and amp*sin computed in floating point (tolerance 3 LSB).
module tb_cordic_rotate;
  localparam int ITER = 16;
  localparam int LAT  = ITER + 2;
  localparam int N    = 2000;
  localparam real PI  = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] amp, cos_o, sin_o;
  logic [31:0] phase;
  int checks = 0, failures = 0;
  real ec [N + LAT + 1];
  real es [N + LAT + 1];
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  cordic_rotate #(.DW(16), .PH_W(32), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(10 * (N + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    amp = 0; phase = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < N + LAT; t++) begin
      real a, ang;
      if (t < N) begin
        amp   <= 16'(t == 0 ? 32767 : ($urandom % 65535) - 32767);
        phase <= (t == 1) ? 32'h4000_0000 : $urandom;
      end
      @(posedge clk);
      // inputs sampled at this edge (index t)
      a = real'(amp); ang = 2.0 * PI * real'(phase) / 4294967296.0;
      ec[t] = a * $cos(ang);
      es[t] = a * $sin(ang);
      if (t >= LAT && t - LAT < N) begin
        #1;
        checks++;
        if (rabs(real'(cos_o) - ec[t - LAT + 1]) > 3.0 || rabs(real'(sin_o) - es[t - LAT + 1]) > 3.0) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d got %0d %0d exp %f %f", t, cos_o, sin_o,
                                      ec[t - LAT + 1], es[t - LAT + 1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
