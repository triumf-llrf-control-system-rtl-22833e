// tb_rf_pulse_gate: RF off gives zero; CW passes the amplitude one clock later;
// pulse mode with period 40 and width 10 passes it for exactly 10 of every 40
// clocks, in one contiguous burst per period, and zero in between.
module tb_rf_pulse_gate;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0;
  rf_cfg_t cfg;
  logic signed [15:0] amp_in, amp_out;
  logic gate;
  int checks = 0, failures = 0;

  rf_pulse_gate #(.DW(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: out %0d gate %0d", what, amp_out, gate);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int on, bursts;
    logic prev;
    cfg = '{rf_on: 1'b0, pulse_mode: 1'b0, period: 32'd40, width: 32'd10};
    amp_in = 16'sd12345;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk); #1;
    check(amp_out == 0 && !gate, "RF off");
    cfg.rf_on = 1;
    for (int n = 0; n < 20; n++) begin
      amp_in = 16'($urandom);
      @(posedge clk); #1;
      check(amp_out == amp_in, "CW passes the amplitude");
    end
    amp_in = 16'sd12345;
    cfg.pulse_mode = 1;
    repeat (45) @(posedge clk);
    on = 0; bursts = 0; prev = (amp_out != 0);
    for (int n = 0; n < 400; n++) begin
      @(posedge clk); #1;
      check(amp_out == 0 || amp_out == 16'sd12345, "pulse output is amplitude or zero");
      if (amp_out != 0) on++;
      if (amp_out != 0 && !prev) bursts++;
      prev = (amp_out != 0);
    end
    if (on != 100 || bursts != 10) $display("on %0d bursts %0d", on, bursts);
    check(on == 100 && bursts == 10, "10 of 40 clocks on, one burst per period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
