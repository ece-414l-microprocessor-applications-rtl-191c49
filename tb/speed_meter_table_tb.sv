// speed_meter_table_tb: the speed meter at its default window (27.5 ms at
// 25 MHz) fed the encoder periods measured on the real motor under
// closed-loop control, compared with the display readings taken there.
//
//   encoder period (us)   125.2  70.1  49.5  41.17  34.5  31.47  29.63  28.96  27.83  27.38
//   reading on the board     57    95   138   169    198   216    225    238    248    251
//
// The encoder wave is generated with a fractional period (a phase
// accumulator), so the count is floor or ceiling of Tm / period.  The
// expected reading computed here is that count divided by 4; the bench
// checks the meter against it exactly (+-1 for the phase) and reports the
// board's reading next to it.  The window is a derived value, so agreement
// with the board is checked only to within 8 counts.
module speed_meter_table_tb;
  timeunit 1ns; timeprecision 1ps;
  import mc_pkg::*;

  localparam real TCLK_US = 0.04;
  localparam int unsigned TM = 687_500;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  si = 1'b0;
  logic  ts_clk, ts_negedge, overflow;
  byte_t s_count, speed;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  always #20 clk = ~clk;

  speed_meter dut (
    .clk(clk), .rst_n(rst_n), .si(si), .ts_clk(ts_clk), .ts_negedge(ts_negedge),
    .s_count(s_count), .speed(speed), .overflow(overflow));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real period_us = 100.0;
  real phase = 0.0;
  always @(posedge clk) begin
    phase = phase + TCLK_US / period_us;
    if (phase >= 1.0) phase = phase - 1.0;
    si <= (phase >= 0.5);
  end

  real         periods [10] = '{125.2, 70.1, 49.5, 41.17, 34.5, 31.47, 29.63, 28.96, 27.83, 27.38};
  int unsigned board   [10] = '{57, 95, 138, 169, 198, 216, 225, 238, 248, 251};

  initial begin
    real         edges_f;
    int unsigned lo, hi;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    foreach (periods[i]) begin
      period_us = periods[i];
      @(posedge clk iff ts_negedge);    // frame with the old period
      @(posedge clk iff ts_negedge);
      @(posedge clk); #1;
      edges_f = real'(TM - 1) * TCLK_US / period_us;
      lo = $rtoi(edges_f) / 4;
      hi = ($rtoi(edges_f) + 1) / 4;
      $display("period %6.2f us: reading %0d, expected %0d..%0d, board %0d",
               period_us, speed, lo, hi, board[i]);
      check(speed >= lo && speed <= hi,
            $sformatf("period %0.2f us read %0d, expected %0d..%0d", period_us, speed, lo, hi));
      check(int'(speed) >= int'(board[i]) - 8 && int'(speed) <= int'(board[i]) + 8,
            $sformatf("period %0.2f us read %0d, board read %0d", period_us, speed, board[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25 * 1_250_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
