// mc_pkg: types and constants shared by the motor speed controller.
//
// The controller is an 8-bit design end to end: the switch set-point, the
// measured speed shown on the display and the PWM width are all unsigned
// 8-bit numbers on the same 0..255 scale, so that a set-point of N asks for
// the speed that the display shows as N.  The speed counter itself is 10 bits
// wide (full scale 1024) and only its 8 most significant bits leave the
// speed meter.
package mc_pkg;

  // 8-bit quantities: set-point R, speed C, PWM width pw.
  localparam int unsigned DATA_W      = 8;
  localparam int unsigned DATA_MAX    = (1 << DATA_W) - 1;   // 255

  // Speed counter: counts to 1024 at full speed, 8 MSBs are passed on.
  localparam int unsigned SCOUNT_W    = 10;

  typedef logic [DATA_W-1:0] byte_t;

  // States of the proportional controller (ASM chart S0..S3).
  //   S0: wait for the end of a measurement window, capture the speed
  //   S1: form the magnitude of the error and its sign
  //   S2: speed too low  -> divide error by 1/Kp, then raise pw
  //   S3: speed too high -> divide error by 1/Kp, then lower pw
  typedef enum logic [1:0] {
    S0_WAIT   = 2'd0,
    S1_ERROR  = 2'd1,
    S2_RAISE  = 2'd2,
    S3_LOWER  = 2'd3
  } ctrl_state_t;

endpackage
