// rf_pulse_gate: RF on/off switch and pulse/CW mode of the cavity drive.
//
// The amplitude word that multiplies the drive NCO passes through this gate. With
// rf_on low the amplitude is zero. In CW mode it passes unchanged. In pulse mode a
// counter repeats every `period` clocks and the amplitude passes only during the
// first `width` clocks of each period, so the cavity is driven in bursts (used at
// start-up before the cavity is tuned, then the system is switched to CW). The
// description names the pulse and CW modes and an RF on/off control only; the
// counter scheme and the period/width controls are this implementation's.
// Periods below 1 are treated as 1. The output is registered: one clock.
module rf_pulse_gate
  import llrf_pkg::rf_cfg_t;
#(
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rf_cfg_t              cfg,
  input  logic signed [DW-1:0] amp_in,
  output logic signed [DW-1:0] amp_out,
  output logic                 gate
);
  logic [31:0] cnt;

  always_comb begin
    if (!cfg.rf_on)          gate = 1'b0;
    else if (cfg.pulse_mode) gate = cnt < cfg.width;
    else                     gate = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      amp_out <= '0;
    end else begin
      if (!cfg.rf_on || !cfg.pulse_mode || cnt + 1 >= cfg.period) cnt <= '0;
      else cnt <= cnt + 1'b1;
      amp_out <= gate ? amp_in : '0;
    end
  end

  // RF off always silences the drive on the next clock.
  a_rf_off: assert property (@(posedge clk) disable iff (!rst_n) !cfg.rf_on |=> amp_out == '0);
endmodule
