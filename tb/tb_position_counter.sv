// tb_position_counter: random pulse trains with random direction and enable;
// the count must follow a reference count of rising pulse edges (+1 up, -1
// down, only while enabled), one clock after each edge; clear zeroes it.
module tb_position_counter;
  logic clk = 0, rst_n = 0;
  logic pulse, en, up, clear;
  logic signed [31:0] count;
  int checks = 0, failures = 0;

  position_counter #(.CNT_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_cnt;
    logic prev;
    pulse = 0; en = 0; up = 1; clear = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ref_cnt = 0; prev = 0;
    for (int t = 0; t < 4000; t++) begin
      if (t % 97 == 0) up = $urandom % 2;
      if (t % 211 == 0) en = ($urandom % 4) != 0;
      clear = (t == 2000);
      pulse = ($urandom % 3) == 0;
      if (clear) ref_cnt = 0;
      else if (en && pulse && !prev) ref_cnt += up ? 1 : -1;
      prev = pulse;
      @(posedge clk); #1;
      checks++;
      if (count != ref_cnt) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d exp %0d", t, count, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
