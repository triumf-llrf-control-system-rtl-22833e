// tb_loop_filter: holds the phase error at several constant values and checks
// that f = center + pe*kp/2^4 + (sum of pe*ki)/2^12 every clock (the integral
// ramps at pe*ki/2^12 per clock), computed here with 64-bit integers.
module tb_loop_filter;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] pe;
  logic [31:0] ftw_center, f;
  logic [15:0] kp, ki;
  int checks = 0, failures = 0;

  loop_filter #(.DW(16), .PH_W(32), .KP_SHIFT(4), .KI_SHIFT(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, e;
    pe = 0; kp = 0; ki = 0; ftw_center = 32'd1518700436;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    acc = 0;
    for (int seg = 0; seg < 6; seg++) begin
      pe = 16'($urandom);
      kp = 16'($urandom);
      ki = 16'($urandom);
      for (int n = 0; n < 200; n++) begin
        @(posedge clk); #1;
        acc += longint'(pe) * longint'(ki);
        e = longint'(ftw_center) + ((longint'(pe) * longint'(kp)) >>> 4) + (acc >>> 12);
        checks++;
        if (f != 32'(e)) begin
          failures++;
          if (failures < 10) $display("seg %0d n %0d got %0d exp %0d", seg, n, f, 32'(e));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
