// pwm_generator_tb: self-checking test of the PWM generator.
//
// Two instances run side by side: one with the default divider (DIV_M = 101,
// period 255 * 101 clocks = 1.0302 ms at 25 MHz) and one with DIV_M = 3 so
// that many widths can be swept quickly.  For each commanded width the test
// measures, over one whole period between period_start pulses, the period
// length and the number of clocks the output is high, and compares them with
// 255 * DIV_M and duty * DIV_M.  It also changes the width in the middle of
// a period and checks that the running period is not affected.
module pwm_generator_tb;
  timeunit 1ns; timeprecision 1ps;
  import mc_pkg::*;

  localparam int unsigned M_FAST = 3;
  localparam int unsigned M_DEF  = 101;

  logic  clk = 1'b0;
  logic  rst_n;
  byte_t duty_f, duty_d;
  logic  pwm_f, pwm_d;
  byte_t cnt_f, cnt_d;
  logic  ps_f, ps_d;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  always #20 clk = ~clk;   // 40 ns, 25 MHz

  pwm_generator #(.DIV_M(M_FAST)) dut_f (
    .clk(clk), .rst_n(rst_n), .duty(duty_f), .pwm(pwm_f),
    .pw_count(cnt_f), .period_start(ps_f));

  pwm_generator dut_d (
    .clk(clk), .rst_n(rst_n), .duty(duty_d), .pwm(pwm_d),
    .pw_count(cnt_d), .period_start(ps_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure one whole period of an instance.  Call right after the clock edge
  // that starts the period (plus #1).  The output is registered, so the
  // sample taken after each edge shows the comparator of the clock before;
  // one extra edge after the closing period_start picks up the last one and
  // leaves the caller at the start of the next period.
  task automatic measure(input bit fast, output int unsigned len,
                         output int unsigned high);
    len = 0; high = 0;
    do begin
      @(posedge clk); #1;
      len++;
      if (fast ? pwm_f : pwm_d) high++;
    end while (!(fast ? ps_f : ps_d));
    @(posedge clk); #1;
    len++;
    if (fast ? pwm_f : pwm_d) high++;
  endtask

  int unsigned len, high;
  byte_t       d;

  initial begin
    rst_n  = 1'b0;
    duty_f = '0;
    duty_d = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // --- fast instance: sweep widths -------------------------------------------
    for (int k = 0; k < 40; k++) begin
      case (k)
        0: d = 8'd0;
        1: d = 8'd255;
        2: d = 8'd1;
        3: d = 8'd254;
        4: d = 8'd128;
        default: d = byte_t'($urandom_range(0, 255));
      endcase
      duty_f = d;
      // the new width is taken at the next period start
      @(posedge clk iff ps_f); #1;
      measure(1'b1, len, high);
      check(len == 255 * M_FAST,
            $sformatf("fast period %0d clocks, expected %0d", len, 255 * M_FAST));
      check(high == int'(d) * M_FAST,
            $sformatf("fast duty %0d: high %0d clocks, expected %0d", d, high, int'(d) * M_FAST));
    end

    // --- fast instance: a width change in mid-period waits for the next one ---
    duty_f = 8'd50;
    @(posedge clk iff ps_f); #1;
    fork
      measure(1'b1, len, high);
      begin
        repeat (100) @(posedge clk);
        duty_f = 8'd200;
      end
    join
    check(high == 50 * M_FAST,
          $sformatf("mid-period change: high %0d, expected %0d", high, 50 * M_FAST));
    measure(1'b1, len, high);
    check(high == 200 * M_FAST,
          $sformatf("after change: high %0d, expected %0d", high, 200 * M_FAST));

    // --- default instance: PWM period (~970 Hz) and a 25 % duty cycle -------
    duty_d = 8'd64;
    @(posedge clk iff ps_d); #1;
    measure(1'b0, len, high);
    check(len == 255 * M_DEF,
          $sformatf("default period %0d clocks, expected %0d", len, 255 * M_DEF));
    check(high == 64 * M_DEF,
          $sformatf("default duty 64: high %0d, expected %0d", high, 64 * M_DEF));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
