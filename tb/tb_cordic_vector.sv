// tb_cordic_vector: random I/Q pairs into the vectoring CORDIC, one per clock;
// each result is compared, exactly ITER+2 clocks later, with sqrt(I^2+Q^2)
// (tolerance 3 LSB) and atan2(Q, I) as a fraction of a turn (tolerance 2e-4 turn
// for vectors longer than 256).
module tb_cordic_vector;
  localparam int ITER = 16;
  localparam int LAT  = ITER + 2;
  localparam int N    = 2000;
  localparam real PI  = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x, y;
  logic [16:0] mag;
  logic [31:0] theta;
  int checks = 0, failures = 0;
  real em [N + LAT + 1];
  real et [N + LAT + 1];
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  cordic_vector #(.DW(16), .PH_W(32), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(10 * (N + 200));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; y = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < N + LAT; t++) begin
      real dt, tt;
      if (t < N) begin
        case (t)
          0: begin x <= -16'sd32768; y <= 16'sd0; end
          1: begin x <= 16'sd32767; y <= -16'sd32768; end
          2: begin x <= 16'sd0; y <= 16'sd1000; end
          default: begin x <= 16'($urandom); y <= 16'($urandom); end
        endcase
      end
      @(posedge clk);
      em[t] = $sqrt(real'(x) * real'(x) + real'(y) * real'(y));
      tt = $atan2(real'(y), real'(x)) / (2.0 * PI);
      if (tt < 0.0) tt += 1.0;
      et[t] = tt;
      if (t >= LAT && t - LAT < N) begin
        int k;
        k = t - LAT + 1;
        #1;
        checks++;
        dt = real'(theta) / 4294967296.0 - et[k];
        if (dt > 0.5) dt -= 1.0;
        if (dt < -0.5) dt += 1.0;
        if (rabs(real'(mag) - em[k]) > 3.0 || (em[k] > 256.0 && rabs(dt) > 2.0e-4)) begin
          failures++;
          if (failures < 10) $display("mismatch k=%0d mag %0d exp %f, theta err %f", k, mag, em[k], dt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
