// tb_phase_detector: random I and Q; Pe must equal floor(I*Q/2^15), saturated to
// 16 bits, one clock later. Includes the saturating corner (-32768)^2.
module tb_phase_detector;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_i, q_i, pe;
  int checks = 0, failures = 0;

  phase_detector #(.DW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    i_i = 0; q_i = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1000; t++) begin
      i_i = (t == 0) ? -16'sd32768 : 16'($urandom);
      q_i = (t == 0) ? -16'sd32768 : 16'($urandom);
      e = (longint'(i_i) * longint'(q_i)) >>> 15;
      if (e > 32767) e = 32767;
      @(posedge clk); #1;
      checks++;
      if (longint'(pe) != e) begin
        failures++;
        if (failures < 10) $display("I=%0d Q=%0d got %0d exp %0d", i_i, q_i, pe, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
