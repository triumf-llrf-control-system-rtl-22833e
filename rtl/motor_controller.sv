// motor_controller: tuner step-motor controller with programmable pin polarities
// and a step counter readable by the CPU.
//
// The two limit-switch pins pass through two-flop synchronisers and a polarity
// multiplexer (pin or inverted pin), so drivers and switches of either polarity can
// be used. motor_pulse_gen makes the step pulse and direction in one of the three
// modes; its enable passes through a polarity multiplexer to the driver's enable
// pin. position_counter counts the steps, up or down by direction, using the
// enable before the polarity multiplexer. The step, direction and enable pins are
// registered. Structure after the description's motor controller diagram; the
// synchronisers are this implementation's addition.
module motor_controller
  import llrf_pkg::motor_cfg_t, llrf_pkg::motor_status_t;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  motor_cfg_t    cfg,
  input  logic          up_limit_in,
  input  logic          down_limit_in,
  output logic          en_out,
  output logic          dir_out,
  output logic          pulse_out,
  output motor_status_t status
);
  logic [1:0] up_sync, dn_sync;
  logic       up_lim, dn_lim, en, dir, pulse, moving;
  logic signed [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      up_sync <= '0;
      dn_sync <= '0;
    end else begin
      up_sync <= {up_sync[0], up_limit_in};
      dn_sync <= {dn_sync[0], down_limit_in};
    end
  end

  assign up_lim = cfg.up_lim_inv ? !up_sync[1] : up_sync[1];
  assign dn_lim = cfg.dn_lim_inv ? !dn_sync[1] : dn_sync[1];

  motor_pulse_gen #(.CNT_W(32)) u_gen (
    .clk, .rst_n, .period(cfg.period), .high_time(cfg.high_time), .mode(cfg.mode),
    .run(cfg.run), .dir_up(cfg.dir_up), .up_limit(up_lim), .down_limit(dn_lim),
    .en, .dir, .pulse, .moving
  );

  position_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .pulse, .en, .up(dir), .clear(cfg.cnt_clear), .count
  );

  assign en_out    = cfg.en_inv ? !en : en;
  assign dir_out   = dir;
  assign pulse_out = pulse;

  assign status.position   = 32'(count);
  assign status.up_limit   = up_lim;
  assign status.down_limit = dn_lim;
  assign status.moving     = moving;
  assign status.dir_up     = dir;
endmodule
