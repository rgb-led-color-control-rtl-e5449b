// top_rgb_ctrl: RGB LED colour control from accelerometer tilt and temperature.
//
// The ADXL362 interface keeps the latest X, Y, Z and temperature words. The
// colour-latch controller cycles every clock through X, Y and temperature,
// selecting each word in turn and copying it into its 16-bit holding
// register (reg_x, reg_y, reg_t), so the three channels always have stable
// values between sensor updates. Each register feeds a Map To Max stage that
// turns the word into a duty cycle (|word - baseline| * 64, saturated, or a
// switch-selected floor if that is larger; switch group 000 turns the
// channel off) and a PWM generator with a 65535-clock period drives the LED
// pin. X -> red (SW[2:0]), Y -> green (SW[5:3]), temperature -> blue
// (SW[8:6], baseline 150). The structure follows the design's block
// diagram; the SPI clock rate (HALF_PERIOD) is this implementation's choice.
//
// Ports: clk (100 MHz), resetn (sync, active low, from a push button),
// sw[8:0], ADXL362 SPI pins acl_csn, acl_mosi, acl_miso, acl_sclk, and the
// LED outputs led16_r, led16_g, led16_b.
module top_rgb_ctrl
  import rgb_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 50,
  parameter int unsigned PWM_PERIOD  = 65535
) (
  input  logic       clk,
  input  logic       resetn,
  input  logic [8:0] sw,
  output logic       acl_csn,
  output logic       acl_mosi,
  input  logic       acl_miso,
  output logic       acl_sclk,
  output logic       led16_r,
  output logic       led16_g,
  output logic       led16_b
);

  logic [1:0]  mux_sel;
  logic        en_x, en_y, en_t;
  rgb_state_e  state;
  logic [15:0] odata_leds;
  logic [15:0] reg_x, reg_y, reg_t;
  logic [15:0] duty_r, duty_g, duty_b;

  accelerom #(.HALF_PERIOD(HALF_PERIOD)) u_acl (
    .clk, .resetn, .mux_sel, .odata(odata_leds),
    .cs_n(acl_csn), .mosi(acl_mosi), .miso(acl_miso), .sclk(acl_sclk)
  );

  fsm_rgb_ctrl u_fsm (
    .clk, .resetn, .mux_sel, .en_x, .en_y, .en_t, .state
  );

  hold_reg #(.WIDTH(16)) u_reg_x (.clk, .resetn, .en(en_x), .d(odata_leds), .q(reg_x));
  hold_reg #(.WIDTH(16)) u_reg_y (.clk, .resetn, .en(en_y), .d(odata_leds), .q(reg_y));
  hold_reg #(.WIDTH(16)) u_reg_t (.clk, .resetn, .en(en_t), .d(odata_leds), .q(reg_t));

  map_to_max #(.BASELINE(0))             u_map_r (.data(reg_x), .sw(sw[2:0]), .duty(duty_r));
  map_to_max #(.BASELINE(0))             u_map_g (.data(reg_y), .sw(sw[5:3]), .duty(duty_g));
  map_to_max #(.BASELINE(TEMP_BASELINE)) u_map_b (.data(reg_t), .sw(sw[8:6]), .duty(duty_b));

  mypwm #(.WIDTH(16), .PERIOD(PWM_PERIOD)) u_pwm_r (.clk, .resetn, .duty(duty_r), .pwm_out(led16_r));
  mypwm #(.WIDTH(16), .PERIOD(PWM_PERIOD)) u_pwm_g (.clk, .resetn, .duty(duty_g), .pwm_out(led16_g));
  mypwm #(.WIDTH(16), .PERIOD(PWM_PERIOD)) u_pwm_b (.clk, .resetn, .duty(duty_b), .pwm_out(led16_b));

endmodule
