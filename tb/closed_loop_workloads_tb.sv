// closed_loop_workloads_tb: the closed-loop experiments run on the original
// board, repeated in simulation with the behavioural motor.
//
// 1. Step responses: from standstill, the set-point steps to 192, 128 and 64,
//    once with Kp = 1/7 and once with Kp = 1/2 (two copies of the design,
//    each with its own motor).  For each run the bench logs the speed after
//    every sample and reports the peak, the overshoot and how often the error
//    changes sign.  It checks that Kp = 1/7 ends inside its dead band
//    (|error| <= 7) and that Kp = 1/2, which changes the width 3.5 times as
//    hard, overshoots at least as far as Kp = 1/7 does.
// 2. Set-point sweep with Kp = 1/7 over the set-points of the tuned
//    measurement table (8, 16, 32, 64, 128, 162, 255): the displayed speed
//    must end within the dead band of the set-point (>= 248 for 255).
//
// Sizes are reduced as in the end-to-end bench (PWM divider 1, sampling
// period 65,536 clocks, window 32,768 clocks); the motor's time constant is
// half a sampling period, about the 25 ms that the measured step responses
// suggest next to a 50 ms sampling period.
module closed_loop_workloads_tb;
  timeunit 1ns; timeprecision 1ps;
  import mc_pkg::*;

  localparam int unsigned TS    = 65_536;
  localparam int unsigned TM    = 32_768;
  localparam int unsigned STEPS = 40;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] sw;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  always #20 clk = ~clk;

  // --- two designs, Kp = 1/7 and Kp = 1/2 ---------------------------------------
  logic       si7, pwm7, ts7;
  logic [3:0] bcd7;
  logic [2:0] en7;
  logic [7:0] speed7, pw7;
  logic       si2, pwm2, ts2;
  logic [3:0] bcd2;
  logic [2:0] en2;
  logic [7:0] speed2, pw2;

  motor_controller_top #(
    .DIV_M(1), .TS_CYCLES(TS), .TM_CYCLES(TM), .KP_INV(7), .SCAN_CYCLES(16)
  ) dut7 (
    .clk(clk), .rst_n(rst_n), .sw(sw), .closed_loop(1'b1), .si(si7),
    .pwm(pwm7), .bcd(bcd7), .digit_en(en7), .speed(speed7), .pw(pw7),
    .ts_clk(ts7));

  motor_controller_top #(
    .DIV_M(1), .TS_CYCLES(TS), .TM_CYCLES(TM), .KP_INV(2), .SCAN_CYCLES(16)
  ) dut2 (
    .clk(clk), .rst_n(rst_n), .sw(sw), .closed_loop(1'b1), .si(si2),
    .pwm(pwm2), .bcd(bcd2), .digit_en(en2), .speed(speed2), .pw(pw2),
    .ts_clk(ts2));

  motor_encoder_model #(.TAU_CYCLES(real'(TS) / 2.0), .TM_CYCLES(real'(TM))) motor7 (
    .clk(clk), .pwm(pwm7), .si(si7));

  motor_encoder_model #(.TAU_CYCLES(real'(TS) / 2.0), .TM_CYCLES(real'(TM))) motor2 (
    .clk(clk), .pwm(pwm2), .si(si2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Stop both motors and restart both designs from reset.
  task automatic restart();
    rst_n = 1'b0;
    sw    = 8'd0;
    motor7.duty = 0.0;
    motor2.duty = 0.0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  endtask

  // Both designs share the sampling schedule (same sizes, same reset).
  task automatic next_sample();
    @(posedge clk iff dut7.u_speed.ts_negedge);
    @(posedge clk); #1;
  endtask

  int unsigned targets [3] = '{192, 128, 64};
  int unsigned sweep   [7] = '{8, 16, 32, 64, 128, 162, 255};

  initial begin
    int unsigned r, peak7, peak2, flips7, flips2;
    int          err7, err2, last7, last2;
    string       trace7, trace2;

    // --- step responses ---------------------------------------------------------
    foreach (targets[t]) begin
      r = targets[t];
      restart();
      next_sample();
      sw = 8'(r);
      peak7 = 0; peak2 = 0; flips7 = 0; flips2 = 0; last7 = 0; last2 = 0;
      trace7 = ""; trace2 = "";
      for (int k = 0; k < STEPS; k++) begin
        next_sample();
        if (speed7 > peak7) peak7 = speed7;
        if (speed2 > peak2) peak2 = speed2;
        err7 = int'(speed7) - int'(r);
        err2 = int'(speed2) - int'(r);
        if (err7 != 0 && last7 != 0 && ((err7 > 0) != (last7 > 0))) flips7++;
        if (err2 != 0 && last2 != 0 && ((err2 > 0) != (last2 > 0))) flips2++;
        if (err7 != 0) last7 = err7;
        if (err2 != 0) last2 = err2;
        if (k < 16) begin
          trace7 = {trace7, $sformatf(" %0d", speed7)};
          trace2 = {trace2, $sformatf(" %0d", speed2)};
        end
      end
      $display("step to %0d, Kp=1/7: peak %0d, sign changes %0d, final %0d; first samples:%s",
               r, peak7, flips7, speed7, trace7);
      $display("step to %0d, Kp=1/2: peak %0d, sign changes %0d, final %0d; first samples:%s",
               r, peak2, flips2, speed2, trace2);
      check(int'(speed7) >= int'(r) - 7 && int'(speed7) <= int'(r) + 7,
            $sformatf("Kp=1/7 step to %0d ends at %0d", r, speed7));
      check(peak2 >= peak7,
            $sformatf("Kp=1/2 peak %0d below Kp=1/7 peak %0d at set-point %0d",
                      peak2, peak7, r));
    end

    // --- set-point sweep, Kp = 1/7 ------------------------------------------------
    restart();
    foreach (sweep[i]) begin
      r  = sweep[i];
      sw = 8'(r);
      repeat (STEPS) next_sample();
      $display("set-point %0d: display %0d, width %0d", r, speed7, pw7);
      if (r == 255)
        check(speed7 >= 248, $sformatf("set-point 255 reads %0d", speed7));
      else
        check(int'(speed7) >= int'(r) - 7 && int'(speed7) <= int'(r) + 7,
              $sformatf("set-point %0d reads %0d", r, speed7));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (450 * TS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
