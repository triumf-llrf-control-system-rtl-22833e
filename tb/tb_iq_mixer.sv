// tb_iq_mixer: random samples and NCO values; I and Q must equal x*c/2^15 and
// -x*s/2^15 (floor) one clock later.
module tb_iq_mixer;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x, c, s, i_o, q_o;
  int checks = 0, failures = 0;

  iq_mixer #(.DW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ei, eq;
    x = 0; c = 0; s = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1000; t++) begin
      x = 16'($urandom);
      c = 16'(($urandom % 65535) - 32767);
      s = 16'(($urandom % 65535) - 32767);
      ei = (longint'(x) * longint'(c)) >>> 15;
      eq = -((longint'(x) * longint'(s)) >>> 15);
      @(posedge clk); #1;
      checks++;
      if (longint'(i_o) != ei || longint'(q_o) != eq) begin
        failures++;
        if (failures < 10) $display("x=%0d c=%0d s=%0d got %0d %0d exp %0d %0d", x, c, s, i_o, q_o, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
