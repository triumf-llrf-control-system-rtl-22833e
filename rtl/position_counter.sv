// position_counter: up/down counter of the tuner motor's step pulses.
//
// On each rising edge of the step pulse, while the driver is enabled, the count
// goes up by one for the up direction and down by one for the down direction, so
// it holds the net number of steps: a backup of the tuner position when no
// potentiometer is fitted. The pulse is sampled on the system clock (edge
// detection) rather than used as a clock; clear sets the count to zero. The
// CLK/EN/UP-DOWN inputs follow the description's counter; the synchronous edge
// detection is this implementation's choice. The count changes one clock after
// the rising edge of pulse.
module position_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pulse,
  input  logic                    en,
  input  logic                    up,
  input  logic                    clear,
  output logic signed [CNT_W-1:0] count
);
  logic pulse_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pulse_q <= 1'b0;
      count   <= '0;
    end else begin
      pulse_q <= pulse;
      if (clear) count <= '0;
      else if (en && pulse && !pulse_q) count <= up ? count + 1'b1 : count - 1'b1;
    end
  end
endmodule
