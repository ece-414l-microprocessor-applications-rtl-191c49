// p_controller: proportional speed controller, updating the PWM width once
// per sampling period.
//
// The controller compares the set-point R (switches) with the measured speed
// C and changes the PWM width pw by E = Kp * |R - C|.  Kp = 1/KP_INV, and the
// multiplication by Kp is done as a division by KP_INV with repeated
// subtraction, one subtraction per clock, so no multiplier or divider is
// needed.  The state machine is:
//
//   S0  wait for the end of a measurement window (sample = falling edge of
//       Ts-clk); on it, C <- s_count and go to S1.
//   S1  E <- 0; if R > C: C <- R - C, go to S2; else C <- C - R, go to S3.
//   S2  (too slow) while C > KP_INV: E <- E + 1, C <- C - KP_INV.
//       Then pw <- 255 if E + pw > 255, else pw <- pw + E; go to S0.
//   S3  (too fast) while C > KP_INV: E <- E + 1, C <- C - KP_INV.
//       Then pw <- 0 if E > pw, else pw <- pw - E; go to S0.
//
// Note that the loop test is the strict "C > 1/Kp", so an error of exactly
// k*KP_INV gives E = k - 1: the controller has a dead band of KP_INV around
// the set-point.  R is read once, in S1.
//
// Interface:
//   sample    one-clock pulse; s_count must be valid with it.
//   s_count   measured speed, 0..255.
//   r         set-point, 0..255.
//   pw        PWM width, 0..255, a register that changes once per sample.
//   state     current state, for observation.
//
// Timing: an update takes 2 + E + 1 clocks after the sample pulse (at most
// 258 clocks with KP_INV = 1), far below the sampling period.
//
// From the source design: the four states, their register transfers, the
// strict comparisons and the clamps to 0 and 255, and Kp = 1/7, the value
// the tuning settled on (1/2 oscillated).  Own choices: register widths,
// the synchronous active-low reset, pw = 0 after reset, and that a sample
// pulse arriving while an update is still running is ignored.
module p_controller
  import mc_pkg::*;
#(
  parameter int unsigned KP_INV = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample,
  input  byte_t       s_count,
  input  byte_t       r,
  output byte_t       pw,
  output ctrl_state_t state
);

  initial begin
    assert (KP_INV >= 1 && KP_INV <= DATA_MAX)
      else $error("p_controller: KP_INV must be in 1..255");
  end

  localparam byte_t K = byte_t'(KP_INV);

  byte_t       c;      // speed, then error magnitude, then remainder
  byte_t       e;      // quotient: correction to apply to pw
  logic  [8:0] e_plus_pw;

  assign e_plus_pw = {1'b0, e} + {1'b0, pw};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S0_WAIT;
      c     <= '0;
      e     <= '0;
      pw    <= '0;
    end else begin
      unique case (state)
        S0_WAIT: begin
          if (sample) begin
            c     <= s_count;
            state <= S1_ERROR;
          end
        end
        S1_ERROR: begin
          e <= '0;
          if (r > c) begin
            c     <= r - c;
            state <= S2_RAISE;
          end else begin
            c     <= c - r;
            state <= S3_LOWER;
          end
        end
        S2_RAISE: begin
          if (c > K) begin
            e <= e + 1'b1;
            c <= c - K;
          end else begin
            pw    <= (e_plus_pw > 9'(DATA_MAX)) ? byte_t'(DATA_MAX) : e_plus_pw[7:0];
            state <= S0_WAIT;
          end
        end
        S3_LOWER: begin
          if (c > K) begin
            e <= e + 1'b1;
            c <= c - K;
          end else begin
            pw    <= (e > pw) ? '0 : pw - e;
            state <= S0_WAIT;
          end
        end
        default: state <= S0_WAIT;
      endcase
    end
  end

endmodule
