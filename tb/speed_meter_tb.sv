// speed_meter_tb: self-checking test of the encoder speed meter.
//
// A small instance (sampling period 8192 clocks, window 4096 clocks) is fed
// square waves of known period P, generated in step with the clock.  The
// number of rising edges in the window is 4096/P, so the speed register must
// show min(n, 1023) / 4, where n, the number of rising edges in the 4095
// counting clocks of the window, is floor or ceiling of 4095/P depending on
// the phase of the wave.  The test also checks the shape of
// Ts-clk (high for Tm, period Ts), that the register changes only at the
// falling edge of Ts-clk and keeps its value in between, and that the
// counter saturates (and flags overflow) instead of wrapping.
//
// A second instance with the default window (687,500 clocks = 27.5 ms at
// 25 MHz) is fed the fastest encoder rate measured on the motor, a 27.38 us
// period, for which the expected reading is 251.
module speed_meter_tb;
  timeunit 1ns; timeprecision 1ps;
  import mc_pkg::*;

  localparam int unsigned TS_S = 8192;
  localparam int unsigned TM_S = 4096;

  logic  clk = 1'b0;
  logic  rst_n;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  always #20 clk = ~clk;   // 25 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // --- encoder stimulus, one per instance --------------------------------------
  int unsigned p_s = 16;         // period in clocks, small instance
  int unsigned ph_s = 0;
  logic        si_s = 1'b0;
  int unsigned ph_d = 0;
  logic        si_d = 1'b0;
  localparam int unsigned P_D = 684;   // 27.36 us at 40 ns

  always @(posedge clk) begin
    if (!rst_n) begin
      ph_s <= 0; si_s <= 1'b0;
      ph_d <= 0; si_d <= 1'b0;
    end else begin
      ph_s <= (ph_s + 1 >= p_s) ? 0 : ph_s + 1;
      si_s <= (ph_s >= p_s / 2);
      ph_d <= (ph_d + 1 >= P_D) ? 0 : ph_d + 1;
      si_d <= (ph_d >= P_D / 2);
    end
  end

  // --- DUTs -------------------------------------------------------------------------
  logic  tsclk_s, tsneg_s, ovf_s;
  byte_t scount_s, speed_s;
  logic  tsclk_d, tsneg_d, ovf_d;
  byte_t scount_d, speed_d;

  speed_meter #(.TS_CYCLES(TS_S), .TM_CYCLES(TM_S)) dut_s (
    .clk(clk), .rst_n(rst_n), .si(si_s), .ts_clk(tsclk_s),
    .ts_negedge(tsneg_s), .s_count(scount_s), .speed(speed_s),
    .overflow(ovf_s));

  speed_meter dut_d (
    .clk(clk), .rst_n(rst_n), .si(si_d), .ts_clk(tsclk_d),
    .ts_negedge(tsneg_d), .s_count(scount_d), .speed(speed_d),
    .overflow(ovf_d));

  // --- Ts-clk shape and register stability (small instance) -----------------
  int unsigned high_run = 0, period_run = 0, frames = 0;
  logic        tsclk_q = 1'b0;
  logic        tsneg_q = 1'b0;
  byte_t       speed_q = '0;
  int unsigned ovf_seen = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      tsclk_q <= tsclk_s;
      tsneg_q <= tsneg_s;
      speed_q <= speed_s;
      if (ovf_s) ovf_seen <= ovf_seen + 1;
      if (tsclk_s && !tsclk_q) begin
        if (frames > 0)
          check(period_run == TS_S,
                $sformatf("Ts-clk period %0d, expected %0d", period_run, TS_S));
        period_run <= 1;
        high_run   <= 1;
        frames     <= frames + 1;
      end else begin
        period_run <= period_run + 1;
        if (tsclk_s) high_run <= high_run + 1;
      end
      if (!tsclk_s && tsclk_q)
        check(high_run == TM_S,
              $sformatf("Ts-clk high for %0d, expected %0d", high_run, TM_S));
      // the speed register may only change on the clock that ends the
      // window (the falling-edge pulse of Ts-clk)
      if (speed_s != speed_q)
        check(tsneg_q,
              "speed register changed away from the falling edge of Ts-clk");
    end
  end

  // Wait for the next falling edge of Ts-clk and return the speed loaded there.
  task automatic next_speed_s(output byte_t v);
    @(posedge clk iff tsneg_s);
    @(posedge clk); #1;
    v = speed_s;
  endtask

  byte_t       v;
  int unsigned n_lo, n_hi, e_lo, e_hi;
  int unsigned periods [10] = '{16, 8, 4, 2048, 10, 6, 32, 12, 5, 7};

  initial begin
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    foreach (periods[i]) begin
      p_s = periods[i];
      next_speed_s(v);          // this frame may mix the old and new period
      next_speed_s(v);
      // rising edges seen in the TM-1 counting clocks of the window
      // (the first clock of the window clears the counter)
      n_lo = (TM_S - 1) / p_s;
      n_hi = (TM_S - 1 + p_s - 1) / p_s;
      e_lo = ((n_lo > 1023) ? 1023 : n_lo) / 4;
      e_hi = ((n_hi > 1023) ? 1023 : n_hi) / 4;
      check(v >= e_lo && v <= e_hi,
            $sformatf("P=%0d: speed %0d, expected %0d..%0d", p_s, v, e_lo, e_hi));
    end
    check(ovf_seen > 0, "counter never saturated");

    // --- default window, fastest motor speed --------------------------------
    @(posedge clk iff tsneg_d);
    @(posedge clk iff tsneg_d);
    @(posedge clk); #1;
    check(speed_d == 8'd251,
          $sformatf("default window, 27.36 us encoder period: speed %0d, expected 251", speed_d));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
