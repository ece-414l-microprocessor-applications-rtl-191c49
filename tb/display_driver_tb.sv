// display_driver_tb: self-checking test of the multiplexed display driver.
//
// A fast instance (SCAN_CYCLES = 5) is given every value 0..255, each held
// for a few scan rounds.  A monitor follows the digit enables and, for every
// complete round (ones, tens, hundreds), compares the three BCD digits with
// value % 10, value / 10 % 10 and value / 100 computed here, and checks that
// the enables are one-hot, appear in the order ones-tens-hundreds and that
// each digit is held for exactly SCAN_CYCLES clocks.  A default instance
// checks the 25,000-clock (1 ms) digit time.
module display_driver_tb;
  timeunit 1ns; timeprecision 1ps;
  import mc_pkg::*;

  localparam int unsigned SCAN_F = 5;
  localparam int unsigned SCAN_D = 25_000;

  logic  clk = 1'b0;
  logic  rst_n;
  byte_t value;
  logic [3:0] bcd_f, bcd_d;
  logic [2:0] en_f, en_d;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  always #20 clk = ~clk;

  display_driver #(.SCAN_CYCLES(SCAN_F)) dut_f (
    .clk(clk), .rst_n(rst_n), .value(value), .bcd(bcd_f), .digit_en(en_f));

  display_driver dut_d (
    .clk(clk), .rst_n(rst_n), .value(value), .bcd(bcd_d), .digit_en(en_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Observe one digit slot of the fast instance: wait until the enables
  // change, then count how long they stay.
  task automatic slot(output logic [2:0] en, output logic [3:0] d,
                      output int unsigned len);
    en  = en_f;
    d   = bcd_f;
    len = 0;
    while (en_f == en) begin
      check(bcd_f == d, "BCD bus changed inside a digit slot");
      @(posedge clk); #1;
      len++;
    end
  endtask

  logic [2:0]  en;
  logic [3:0]  d0, d1, d2;
  int unsigned len, rounds;
  byte_t       shown;

  initial begin
    rst_n = 1'b0;
    value = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;

    // align to the start of a ones slot
    while (en_f != 3'b100) begin @(posedge clk); #1; end
    slot(en, d2, len);

    rounds = 0;
    for (int v = 0; v < 256; v++) begin
      // each value is applied during the hundreds slot before its first
      // round, and is taken when that round starts
      // two full rounds per value; the first one shows the new value
      for (int r = 0; r < 2; r++) begin
        slot(en, d0, len);
        check(en == 3'b001, $sformatf("slot 0 enables %b", en));
        check(len == SCAN_F, $sformatf("ones held %0d clocks", len));
        slot(en, d1, len);
        check(en == 3'b010, $sformatf("slot 1 enables %b", en));
        check(len == SCAN_F, $sformatf("tens held %0d clocks", len));
        // the hundreds slot is checked while the next value is applied
        en  = en_f;
        d2  = bcd_f;
        check(en == 3'b100, $sformatf("slot 2 enables %b", en));
        check(d0 == 4'(v % 10) && d1 == 4'((v / 10) % 10) && d2 == 4'(v / 100),
              $sformatf("value %0d shown as %0d%0d%0d", v, d2, d1, d0));
        rounds++;
        if (r == 0) slot(en, d2, len);
        else begin
          if (v < 255) value = byte_t'(v + 1);
          slot(en, d2, len);
        end
        check(len == SCAN_F, $sformatf("hundreds held %0d clocks", len));
      end
    end
    check(rounds == 512, "round count");

    // default instance: 1 ms per digit
    while (en_d == 3'b010) begin @(posedge clk); #1; end
    while (en_d != 3'b010) begin @(posedge clk); #1; end
    len = 0;
    while (en_d == 3'b010) begin @(posedge clk); #1; len++; end
    check(len == SCAN_D, $sformatf("default digit time %0d, expected %0d", len, SCAN_D));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
