// tb_harmonic_ftw: random frequency words and ratios; the output must be
// f*ratio modulo 2^32 one clock later.
module tb_harmonic_ftw;
  logic clk = 0, rst_n = 0;
  logic [31:0] f, ftw;
  logic [7:0] ratio;
  int checks = 0, failures = 0;

  harmonic_ftw #(.PH_W(32), .RATIO_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    f = 0; ratio = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      f = $urandom;
      ratio = (t < 4) ? 8'(t + 1) : 8'($urandom);
      e = (longint'(f) * longint'(ratio)) % (64'd1 << 32);
      @(posedge clk); #1;
      checks++;
      if (longint'(ftw) != e) begin
        failures++;
        if (failures < 10) $display("f=%0d r=%0d got %0d exp %0d", f, ratio, ftw, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
