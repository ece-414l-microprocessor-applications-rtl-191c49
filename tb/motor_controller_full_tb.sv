// motor_controller_full_tb: the motor speed controller at its real sizes
// (25 MHz clock, PWM divider 101, 50 ms sampling period with a 27.5 ms
// measurement window, Kp = 1/7, 1 ms display digits) driving the behavioural
// motor, whose time constant is set to 25 ms.
//
// The bench runs the motor open loop at width 128 and then closes the loop
// with a set-point of 64, and checks:
//   - the PWM period is 255 * 101 clocks (about 970 Hz) and its high time
//     is width * 101 clocks;
//   - every measurement equals the encoder edges this bench counts in the
//     window, divided by 4 (+-1);
//   - the open-loop speed matches the motor's characteristic (about 180);
//   - in closed loop the speed settles within the controller's dead band
//     of the set-point;
//   - the display shows the speed register.
// 38 sampling periods (1.9 s of motor time, about 48 million clocks) are run.
module motor_controller_full_tb;
  timeunit 1ns; timeprecision 1ps;
  import mc_pkg::*;

  localparam int unsigned M  = 101;
  localparam int unsigned TS = 1_250_000;
  localparam int unsigned TM = 687_500;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] sw;
  logic       closed_loop;
  logic       si;
  logic       pwm;
  logic [3:0] bcd;
  logic [2:0] digit_en;
  logic [7:0] speed, pw;
  logic       ts_clk;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  always #20 clk = ~clk;   // 25 MHz

  motor_controller_top dut (
    .clk(clk), .rst_n(rst_n), .sw(sw), .closed_loop(closed_loop), .si(si),
    .pwm(pwm), .bcd(bcd), .digit_en(digit_en), .speed(speed), .pw(pw),
    .ts_clk(ts_clk));

  motor_encoder_model #(.TAU_CYCLES(625_000.0), .TM_CYCLES(real'(TM))) motor (
    .clk(clk), .pwm(pwm), .si(si));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // --- measurement monitor ---------------------------------------------------------
  int unsigned edges = 0, n_frames = 0;
  logic        si_q = 1'b0, ts_q = 1'b0;
  int unsigned exp_speed;
  always @(posedge clk) if (rst_n) begin
    si_q <= si;
    ts_q <= ts_clk;
    if (ts_clk && !ts_q) edges <= 0;
    else if (ts_clk && si && !si_q) edges <= edges + 1;
    if (ts_q && !ts_clk) begin
      exp_speed = ((edges > 1023) ? 1023 : edges) / 4;
      fork
        begin
          automatic int unsigned e = exp_speed;
          @(posedge clk); #1;
          check(int'(speed) >= int'(e) - 1 && int'(speed) <= int'(e) + 1,
                $sformatf("speed register %0d, bench counted %0d", speed, e));
          n_frames++;
        end
      join_none
    end
  end

  // --- PWM monitor: rising edge to rising edge -------------------------------------
  // Only periods during which the width did not change (nor in the few clocks
  // before, when the generator latches it) are checked.
  int unsigned since_rise = 0, high_len = 0, n_pwm = 0, since_change = 0;
  logic        pwm_q = 1'b0;
  byte_t       pw_q = '0;
  always @(posedge clk) if (rst_n) begin
    pwm_q <= pwm;
    pw_q  <= pw;
    since_change <= (pw != pw_q) ? 0 : since_change + 1;
    if (pwm && !pwm_q) begin
      if (since_rise > 0 && since_change > since_rise + 4) begin
        check(since_rise == 255 * M,
              $sformatf("PWM period %0d clocks, expected %0d", since_rise, 255 * M));
        check(high_len == int'(pw) * M,
              $sformatf("PWM high %0d clocks for width %0d", high_len, pw));
        n_pwm++;
      end
      since_rise <= 1;
      high_len   <= 1;
    end else begin
      if (since_rise > 0) since_rise <= since_rise + 1;
      if (pwm) high_len <= high_len + 1;
    end
  end

  // --- display monitor ------------------------------------------------------------------
  logic [2:0]  en_q = 3'b000;
  logic [3:0]  dig [3];
  byte_t       speed_q = '0, round_val = '0;
  int unsigned got = 0, n_rounds = 0;
  always @(posedge clk) if (rst_n) begin
    en_q    <= digit_en;
    speed_q <= speed;
    if (digit_en != en_q) begin
      unique case (digit_en)
        3'b001: begin
          if (got == 3) begin
            check(int'(dig[2]) * 100 + int'(dig[1]) * 10 + int'(dig[0]) == int'(round_val),
                  $sformatf("display %0d%0d%0d, speed was %0d",
                            dig[2], dig[1], dig[0], round_val));
            n_rounds++;
          end
          got       <= 1;
          dig[0]    <= bcd;
          round_val <= speed_q;
        end
        3'b010: begin dig[1] <= bcd; if (got == 1) got <= 2; end
        3'b100: begin dig[2] <= bcd; if (got == 2) got <= 3; end
        default: check(1'b0, $sformatf("digit enables %b", digit_en));
      endcase
    end
  end

  task automatic run_samples(input int unsigned n);
    repeat (n) @(posedge clk iff dut.u_speed.ts_negedge);
    @(posedge clk); #1;
  endtask

  initial begin
    rst_n       = 1'b0;
    sw          = 8'd128;
    closed_loop = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // open loop, width 128
    run_samples(8);
    check(speed >= 176 && speed <= 184,
          $sformatf("open loop, width 128: speed %0d, expected about 180", speed));

    // closed loop, set-point 64
    closed_loop = 1'b1;
    sw = 8'd64;
    run_samples(30);
    check(speed >= 64 - 8 && speed <= 64 + 8,
          $sformatf("closed loop, set-point 64: speed %0d", speed));

    $display("frames=%0d pwm_periods=%0d display_rounds=%0d pw=%0d speed=%0d",
             n_frames, n_pwm, n_rounds, pw, speed);
    check(n_frames >= 30, "too few measurements");
    check(n_pwm > 100,    "too few PWM periods");
    check(n_rounds > 100, "too few display rounds");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (45 * TS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
