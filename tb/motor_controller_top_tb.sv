// motor_controller_top_tb: end-to-end test of the motor speed controller in a
// closed loop with a behavioural motor and encoder.
//
// The controller runs at reduced sizes so that many sampling periods fit in
// a short simulation: PWM divider 1 (255-clock PWM period), sampling period
// 65,536 clocks with a 32,768-clock measurement window, 16-clock display
// digits; Kp keeps its default of 1/7.  The motor model has a time constant
// of one sampling period.
//
// Scenario: open loop with the switches at 128; closed loop to 64 and 192;
// closed loop to 230 with a heavier motor that cannot get there; open loop
// at full width with a lighter motor (over-speed); closed loop to 0.  Throughout, independent monitors check
//   - every measurement: the speed register equals min(n, 1023) / 4 (+-1),
//     n being the encoder rising edges this bench counts inside the window;
//   - every PWM period: the high time equals the width that was selected
//     when the period started (the switches in open loop, the controller's
//     width in closed loop);
//   - every display round: the three BCD digits spell the speed register;
// and the end of each step checks the settled speed.  The bench counts how
// often each mechanism occurred: open- and closed-loop operation, mode
// switches, raise (S2) and lower (S3) updates, the clamps at 255 and 0, the
// speed counter's saturation, and complete display rounds.  Any of them that
// never happened is a failure.
module motor_controller_top_tb;
  timeunit 1ns; timeprecision 1ps;
  import mc_pkg::*;

  localparam int unsigned DIV_M   = 1;
  localparam int unsigned TS      = 65_536;
  localparam int unsigned TM      = 32_768;
  localparam int unsigned KP_INV  = 7;
  localparam int unsigned SCAN    = 16;

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

  always #20 clk = ~clk;

  motor_controller_top #(
    .DIV_M(DIV_M), .TS_CYCLES(TS), .TM_CYCLES(TM), .KP_INV(KP_INV),
    .SCAN_CYCLES(SCAN)
  ) dut (
    .clk(clk), .rst_n(rst_n), .sw(sw), .closed_loop(closed_loop), .si(si),
    .pwm(pwm), .bcd(bcd), .digit_en(digit_en), .speed(speed), .pw(pw),
    .ts_clk(ts_clk));

  motor_encoder_model #(.TAU_CYCLES(real'(TS)), .TM_CYCLES(real'(TM))) motor (
    .clk(clk), .pwm(pwm), .si(si));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // --- mechanism counters ---------------------------------------------------------
  int unsigned n_open = 0, n_closed = 0, n_switch = 0;
  int unsigned n_raise = 0, n_lower = 0, n_clamp_hi = 0, n_clamp_lo = 0;
  int unsigned n_overflow = 0, n_rounds = 0, n_frames = 0, n_pwm = 0;

  logic mode_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    mode_q <= closed_loop;
    if (closed_loop != mode_q) n_switch++;
    if (dut.u_ctrl.state == S1_ERROR) begin
      if (sw > dut.u_ctrl.c) n_raise++; else n_lower++;
    end
    if (dut.u_ctrl.state == S2_RAISE && !(dut.u_ctrl.c > 8'(KP_INV)) &&
        dut.u_ctrl.e + dut.u_ctrl.pw > 255) n_clamp_hi++;
    if (dut.u_ctrl.state == S3_LOWER && !(dut.u_ctrl.c > 8'(KP_INV)) &&
        dut.u_ctrl.e > dut.u_ctrl.pw) n_clamp_lo++;
    if (dut.u_speed.overflow) n_overflow++;
    if (dut.u_speed.ts_negedge) begin
      if (closed_loop) n_closed++; else n_open++;
    end
  end

  // --- speed monitor: count encoder edges in the window ---------------------------
  int unsigned edges = 0;
  logic        si_q = 1'b0, ts_q = 1'b0;
  int unsigned exp_speed;
  always @(posedge clk) if (rst_n) begin
    si_q <= si;
    ts_q <= ts_clk;
    if (ts_clk && !ts_q) edges <= 0;
    else if (ts_clk && si && !si_q) edges <= edges + 1;
    if (ts_q && !ts_clk) begin
      // window just closed; the register loads on the next clock
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

  // --- PWM monitor: high time of each period ---------------------------------------
  // pwm is registered, so the sample taken at a clock edge shows the
  // comparator of the clock before; a period's samples therefore run from
  // two clocks after one period_start to one clock after the next.
  int unsigned hi_cnt = 0, len_cnt = 0;
  byte_t       duty_next = '0, duty_cur = '0;
  logic        ps_q = 1'b0;
  int unsigned n_ps = 0;
  always @(posedge clk) if (rst_n) begin
    ps_q <= dut.u_pwm.period_start;
    if (dut.u_pwm.period_start) duty_next <= pw;
    if (ps_q) begin
      if (n_ps > 0) begin
        check(len_cnt + 1 == 255 * DIV_M,
              $sformatf("PWM period %0d clocks", len_cnt + 1));
        check(hi_cnt + (pwm ? 1 : 0) == int'(duty_cur) * DIV_M,
              $sformatf("PWM high %0d clocks for width %0d",
                        hi_cnt + (pwm ? 1 : 0), duty_cur));
        n_pwm++;
      end
      n_ps++;
      duty_cur <= duty_next;
      len_cnt  <= 0;
      hi_cnt   <= 0;
    end else begin
      len_cnt <= len_cnt + 1;
      if (pwm) hi_cnt <= hi_cnt + 1;
    end
  end

  // --- display monitor: decode complete rounds --------------------------------------
  logic [2:0]  en_q = 3'b000;
  logic [3:0]  dig [3];
  byte_t       speed_q = '0, round_val = '0;
  int unsigned got = 0;
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

  // --- scenario ----------------------------------------------------------------------
  task automatic run_samples(input int unsigned n);
    repeat (n) @(posedge clk iff dut.u_speed.ts_negedge);
    @(posedge clk); #1;
  endtask

  task automatic expect_speed(input int unsigned lo, input int unsigned hi,
                              input string what);
    check(speed >= lo && speed <= hi,
          $sformatf("%s: speed %0d, expected %0d..%0d", what, speed, lo, hi));
  endtask

  initial begin
    rst_n       = 1'b0;
    sw          = 8'd0;
    closed_loop = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // open loop at 128: the motor's own characteristic gives about 180
    sw = 8'd128;
    run_samples(12);
    expect_speed(176, 184, "open loop, width 128");

    // closed loop: the speed follows the set-point within the dead band
    closed_loop = 1'b1;
    sw = 8'd64;
    run_samples(40);
    expect_speed(64 - 8, 64 + 8, "closed loop, set-point 64");
    sw = 8'd192;
    run_samples(40);
    expect_speed(192 - 8, 192 + 8, "closed loop, set-point 192");
    // heavy load: the motor cannot reach the set-point and the width
    // saturates at 255, where the speed settles at the load's maximum
    motor.gain = 0.8;
    sw = 8'd230;
    run_samples(30);
    check(pw == 8'd255, $sformatf("width under heavy load %0d", pw));
    expect_speed(204 - 3, 204 + 3, "heavy load, full width");

    // open loop at full width with a lighter load: faster than full scale
    closed_loop = 1'b0;
    motor.gain  = 1.2;
    run_samples(8);
    expect_speed(255, 255, "over-speed reads full scale");
    motor.gain  = 1.0;

    // closed loop to standstill
    closed_loop = 1'b1;
    sw = 8'd0;
    run_samples(30);
    check(pw == 8'd0, $sformatf("width at set-point 0: %0d", pw));
    expect_speed(0, 2, "closed loop, set-point 0");

    $display("frames=%0d pwm_periods=%0d rounds=%0d open=%0d closed=%0d switches=%0d",
             n_frames, n_pwm, n_rounds, n_open, n_closed, n_switch);
    $display("raise=%0d lower=%0d clamp255=%0d clamp0=%0d overflow=%0d",
             n_raise, n_lower, n_clamp_hi, n_clamp_lo, n_overflow);
    check(n_open > 0,     "open-loop operation never happened");
    check(n_closed > 0,   "closed-loop operation never happened");
    check(n_switch > 0,   "mode switch never happened");
    check(n_raise > 0,    "raise update (S2) never happened");
    check(n_lower > 0,    "lower update (S3) never happened");
    check(n_clamp_hi > 0, "clamp at 255 never happened");
    check(n_clamp_lo > 0, "clamp at 0 never happened");
    check(n_overflow > 0, "speed counter saturation never happened");
    check(n_rounds > 0,   "no display round decoded");
    check(n_frames > 100, "too few measurements checked");
    check(n_pwm > 1000,   "too few PWM periods checked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * TS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
