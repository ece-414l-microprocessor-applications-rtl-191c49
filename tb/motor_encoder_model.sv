// motor_encoder_model: behavioural model of the PWM motor driver, the DC
// motor and its incremental encoder, for simulation only (not synthesizable).
//
// The model low-pass filters the PWM pin with time constant TAU_CYCLES to get
// the effective duty cycle, and maps that duty to a steady-state speed with
// the open-loop characteristic measured on the real motor (PWM width in,
// display reading out):
//     8 -> 19, 16 -> 34, 32 -> 68, 64 -> 128, 128 -> 180, 192 -> 219,
//     255 -> 255, and 0 -> 0,
// linearly interpolated.  The motor speed is thus a first-order response to
// the duty cycle.  A display reading D corresponds to 4*D encoder pulses in
// the measurement window, so the encoder frequency is 4*D/TM_CYCLES pulses
// per clock; the model integrates that frequency into a phase and outputs
// a 50 % square wave.  gain scales the whole characteristic, to model a
// lighter or heavier load.
//
// Ports: clk (simulation clock), pwm (from the controller), si (encoder).
module motor_encoder_model #(
  parameter real TAU_CYCLES = 100_000.0,
  parameter real TM_CYCLES  = 687_500.0
) (
  input  logic clk,
  input  logic pwm,
  output logic si
);

  real duty   = 0.0;   // filtered PWM, 0..1
  real phase  = 0.0;   // encoder phase, in pulses
  real gain   = 1.0;
  real disp_f;         // steady-state display reading for the present duty

  function automatic real curve(real w);
    real xs [8] = '{0.0, 8.0, 16.0, 32.0, 64.0, 128.0, 192.0, 255.0};
    real ys [8] = '{0.0, 19.0, 34.0, 68.0, 128.0, 180.0, 219.0, 255.0};
    if (w <= 0.0)   return 0.0;
    if (w >= 255.0) return 255.0;
    for (int i = 1; i < 8; i++)
      if (w <= xs[i])
        return ys[i-1] + (ys[i] - ys[i-1]) * (w - xs[i-1]) / (xs[i] - xs[i-1]);
    return 255.0;
  endfunction

  initial si = 1'b0;

  always @(posedge clk) begin
    duty   = duty + ((pwm ? 1.0 : 0.0) - duty) / TAU_CYCLES;
    disp_f = gain * curve(duty * 255.0);
    phase  = phase + 4.0 * disp_f / TM_CYCLES;
    if (phase >= 1.0) phase = phase - 1.0;
    si <= (phase >= 0.5);
  end

endmodule
