// pwm_generator: 8-bit pulse-width modulator for the motor drive.
//
// The system clock is divided by DIV_M, and each divided tick advances the
// 8-bit pw_counter.  The counter runs 1, 2, ..., 255 and then wraps to 1, so
// one PWM period is 255 ticks and
//     tau = 255 * DIV_M * T          (T = clock period, 40 ns)
// which is the relation m = tau / (255 T) used to pick the divider.  The
// comparator drives the output high while pw_count <= duty, so duty = 0 gives
// a constant low, duty = 255 a constant high, and in general the duty cycle is
// exactly duty/255.
//
// Interface:
//   duty      commanded pulse width, 0..255 (switches or controller).  It is
//             taken into the comparator only when a new period starts, so
//             a change never produces a shortened or doubled pulse.
//   pwm       registered output, one clock behind the comparator.
//   pw_count  the counter value, for observation.
//   period_start  one-clock pulse on the tick that starts a new period
//             (pw_count goes to 1).
//
// From the source design: the divide-by-m block, the 8-bit pw_counter, the
// "<=" comparator and the 255-step period.  Own choices: counting 1..255
// (so that "<=" spans 0 %..100 %), latching duty once per period, the
// registered output, the synchronous active-low reset, and the DIV_M default
// of 101, which reproduces the ~969 Hz PWM frequency measured on the board
// (25 MHz / (255 * 101) = 970.7 Hz).
module pwm_generator
  import mc_pkg::*;
#(
  parameter int unsigned DIV_M = 101
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t duty,
  output logic  pwm,
  output byte_t pw_count,
  output logic  period_start
);

  localparam int unsigned DIV_W = (DIV_M > 1) ? $clog2(DIV_M) : 1;

  logic [DIV_W-1:0] div_cnt;
  logic             tick;
  byte_t            duty_q;

  // Divide clock by m: one tick every DIV_M clocks.
  generate
    if (DIV_M > 1) begin : g_div
      always_ff @(posedge clk) begin
        if (!rst_n)                              div_cnt <= '0;
        else if (div_cnt == DIV_W'(DIV_M - 1))   div_cnt <= '0;
        else                                     div_cnt <= div_cnt + 1'b1;
      end
      assign tick = (div_cnt == DIV_W'(DIV_M - 1));
    end else begin : g_nodiv
      assign div_cnt = '0;
      assign tick    = 1'b1;
    end
  endgenerate

  // 8-bit pw_counter, 1..255.
  assign period_start = tick && (pw_count == byte_t'(DATA_MAX));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pw_count <= byte_t'(DATA_MAX);   // the first tick starts a period
      duty_q   <= '0;
    end else if (tick) begin
      if (pw_count == byte_t'(DATA_MAX)) begin
        pw_count <= byte_t'(1);
        duty_q   <= duty;
      end else begin
        pw_count <= pw_count + 1'b1;
      end
    end
  end

  // Comparator pw_count <= duty, registered.
  always_ff @(posedge clk) begin
    if (!rst_n) pwm <= 1'b0;
    else        pwm <= (pw_count <= duty_q);
  end

endmodule
