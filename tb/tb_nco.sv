// tb_nco: runs the NCO at several frequency words and phase offsets. Checks that
// the accumulator advances by the frequency word every clock, and that cos/sin
// equal full-scale cos/sin of (accumulator + offset) exactly ITER+3 clocks after
// the accumulator value was seen (tolerance 3 LSB).
module tb_nco;
  localparam int ITER = 16;
  localparam int LAT  = ITER + 3;
  localparam real PI  = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [31:0] ftw, poff, phase_o;
  logic signed [15:0] cos_o, sin_o;
  int checks = 0, failures = 0;
  logic [31:0] hist [$];
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  nco #(.DW(16), .PH_W(32), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev;
    ftw = 32'd1518700436;  // 35.36 MHz at 100 MHz
    poff = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    checks++;
    if (phase_o != ftw) begin failures++; $display("first step %h", phase_o); end
    for (int seg = 0; seg < 4; seg++) begin
      for (int t = 0; t < 500; t++) begin
        prev = phase_o;
        hist.push_back(phase_o + poff);
        @(posedge clk); #1;
        checks++;
        if (phase_o != prev + ftw) failures++;
        if (hist.size() >= LAT) begin
          real ang;
          ang = 2.0 * PI * real'(hist.pop_front()) / 4294967296.0;
          checks++;
          if (rabs(real'(cos_o) - 32767.0 * $cos(ang)) > 3.0 ||
              rabs(real'(sin_o) - 32767.0 * $sin(ang)) > 3.0) begin
            failures++;
            if (failures < 10) $display("seg %0d t %0d got %0d %0d", seg, t, cos_o, sin_o);
          end
        end
      end
      ftw  = $urandom;
      poff = $urandom;
      hist.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
