// tb_amp_modulator: random amplitudes and carrier samples; the output must be
// floor(amp*carrier/2^15), saturated to 16 bits, one clock later.
module tb_amp_modulator;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] amp, carrier, y;
  int checks = 0, failures = 0;

  amp_modulator #(.DW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    amp = 0; carrier = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1000; t++) begin
      amp = (t == 0) ? -16'sd32768 : 16'($urandom);
      carrier = (t == 0) ? -16'sd32768 : 16'($urandom);
      e = (longint'(amp) * longint'(carrier)) >>> 15;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      @(posedge clk); #1;
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("a=%0d c=%0d got %0d exp %0d", amp, carrier, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
