// motor_controller_top: FPGA part of a closed-loop PWM speed controller for
// a small DC motor with a 1000-pulse-per-revolution encoder.
//
// Data flow, once per sampling period Ts:
//   encoder SI -> speed_meter -> measured speed C (0..255)
//   C and the switch set-point R -> p_controller -> PWM width pw
//   pw -> pwm_generator -> PWM pin -> external MOSFET driver -> motor
//   C -> display_driver -> BCD bus + 3 digit enables -> 7-segment display
//
// closed_loop selects the PWM width: 1 takes it from the proportional
// controller, 0 takes the switches directly (the open-loop arrangement used
// to characterise the motor).  The controller keeps running in both modes.
//
// Interface (all synchronous to clk, 25 MHz; rst_n synchronous active low):
//   sw[7:0]       set-point switches R
//   closed_loop   mode select, see above
//   si            encoder square wave, asynchronous
//   pwm           to the motor driver (high = motor on; the driver's own
//                 inverter stage is outside the FPGA)
//   bcd[3:0], digit_en[2:0]   the seven display pins
//   speed[7:0], pw[7:0], ts_clk   for observation (test points)
//
// The block structure and the 8-bit scale follow the source design; the
// mode select, observation ports and reset are this design's own.
module motor_controller_top
  import mc_pkg::*;
#(
  parameter int unsigned DIV_M       = 101,
  parameter int unsigned TS_CYCLES   = 1_250_000,
  parameter int unsigned TM_CYCLES   = 687_500,
  parameter int unsigned KP_INV      = 7,
  parameter int unsigned SCAN_CYCLES = 25_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] sw,
  input  logic       closed_loop,
  input  logic       si,
  output logic       pwm,
  output logic [3:0] bcd,
  output logic [2:0] digit_en,
  output logic [7:0] speed,
  output logic [7:0] pw,
  output logic       ts_clk
);

  byte_t       s_count;
  byte_t       ctrl_pw;
  byte_t       duty;
  logic        ts_negedge;
  logic        s_overflow;
  ctrl_state_t ctrl_state;
  byte_t       pw_count;
  logic        pwm_period_start;

  speed_meter #(
    .TS_CYCLES (TS_CYCLES),
    .TM_CYCLES (TM_CYCLES)
  ) u_speed (
    .clk        (clk),
    .rst_n      (rst_n),
    .si         (si),
    .ts_clk     (ts_clk),
    .ts_negedge (ts_negedge),
    .s_count    (s_count),
    .speed      (speed),
    .overflow   (s_overflow)
  );

  p_controller #(
    .KP_INV (KP_INV)
  ) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .sample  (ts_negedge),
    .s_count (s_count),
    .r       (sw),
    .pw      (ctrl_pw),
    .state   (ctrl_state)
  );

  assign duty = closed_loop ? ctrl_pw : sw;
  assign pw   = duty;

  pwm_generator #(
    .DIV_M (DIV_M)
  ) u_pwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .duty         (duty),
    .pwm          (pwm),
    .pw_count     (pw_count),
    .period_start (pwm_period_start)
  );

  display_driver #(
    .SCAN_CYCLES (SCAN_CYCLES)
  ) u_disp (
    .clk      (clk),
    .rst_n    (rst_n),
    .value    (speed),
    .bcd      (bcd),
    .digit_en (digit_en)
  );

endmodule
