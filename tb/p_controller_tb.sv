// p_controller_tb: self-checking test of the proportional controller.
//
// Two instances run from the same stimulus: the default one (Kp = 1/7) and
// one with Kp = 1/2.  For every sample the test picks a set-point R and a
// measured speed C, pulses sample, and checks the new PWM width against a
// reference computed here in closed form:
//     d = |R - C|,   E = (d == 0) ? 0 : (d - 1) / KP_INV
//     pw' = min(pw + E, 255) if R > C,  max(pw - E, 0) otherwise
// (the ASM chart subtracts 1/Kp while the remainder is strictly greater than
// 1/Kp, which is what the (d - 1) gives).  It also checks the update latency
// of E + 3 clocks, that pw does not move before that, and that the state
// machine is back in S0.  Runs of maximal error drive pw into both clamps,
// and the number of times each clamp and each direction occurred is counted.
module p_controller_tb;
  timeunit 1ns; timeprecision 1ps;
  import mc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        sample;
  byte_t       s_count, r;
  byte_t       pw7, pw2;
  ctrl_state_t st7, st2;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned n_raise = 0, n_lower = 0, n_sat_hi = 0, n_sat_lo = 0;

  always #20 clk = ~clk;

  p_controller dut7 (
    .clk(clk), .rst_n(rst_n), .sample(sample), .s_count(s_count), .r(r),
    .pw(pw7), .state(st7));

  p_controller #(.KP_INV(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .sample(sample), .s_count(s_count), .r(r),
    .pw(pw2), .state(st2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned quotient(int unsigned d, int unsigned k);
    return (d == 0) ? 0 : (d - 1) / k;
  endfunction

  function automatic int unsigned next_pw(int unsigned pw, int unsigned rr,
                                          int unsigned cc, int unsigned k);
    int unsigned e;
    if (rr > cc) begin
      e = quotient(rr - cc, k);
      return (pw + e > 255) ? 255 : pw + e;
    end else begin
      e = quotient(cc - rr, k);
      return (e > pw) ? 0 : pw - e;
    end
  endfunction

  int unsigned ref7 = 0, ref2 = 0;

  // One controller update with set-point rr and speed cc.
  task automatic update(input byte_t rr, input byte_t cc);
    int unsigned e7, e2, new7, new2, lat7, lat2, t;
    bit          done7, done2;
    e7   = quotient((rr > cc) ? rr - cc : cc - rr, 7);
    e2   = quotient((rr > cc) ? rr - cc : cc - rr, 2);
    new7 = next_pw(ref7, rr, cc, 7);
    new2 = next_pw(ref2, rr, cc, 2);
    if (rr > cc) n_raise++; else n_lower++;
    if (rr > cc && ref2 + e2 > 255) n_sat_hi++;
    if (rr <= cc && e2 > ref2)      n_sat_lo++;

    r       = rr;
    s_count = cc;
    sample  = 1'b1;
    @(posedge clk); #1;
    sample  = 1'b0;
    s_count = byte_t'($urandom);   // C is captured on the sample clock only
    t = 1; done7 = 0; done2 = 0; lat7 = 0; lat2 = 0;
    while (!(done7 && done2) && t < 400) begin
      if (!done7 && st7 == S0_WAIT) begin done7 = 1; lat7 = t; end
      if (!done2 && st2 == S0_WAIT) begin done2 = 1; lat2 = t; end
      if (!done7) check(pw7 == byte_t'(ref7), "Kp=1/7: pw moved before the update ended");
      if (!done2) check(pw2 == byte_t'(ref2), "Kp=1/2: pw moved before the update ended");
      if (done7 && done2) break;
      @(posedge clk); #1;
      t++;
    end
    check(lat7 == e7 + 3, $sformatf("Kp=1/7 latency %0d, expected %0d", lat7, e7 + 3));
    check(lat2 == e2 + 3, $sformatf("Kp=1/2 latency %0d, expected %0d", lat2, e2 + 3));
    check(pw7 == byte_t'(new7),
          $sformatf("Kp=1/7 R=%0d C=%0d pw %0d -> %0d, expected %0d", rr, cc, ref7, pw7, new7));
    check(pw2 == byte_t'(new2),
          $sformatf("Kp=1/2 R=%0d C=%0d pw %0d -> %0d, expected %0d", rr, cc, ref2, pw2, new2));
    ref7 = new7;
    ref2 = new2;
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n   = 1'b0;
    sample  = 1'b0;
    s_count = '0;
    r       = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(pw7 == 0 && pw2 == 0 && st7 == S0_WAIT, "reset state");

    // no sample: nothing happens
    repeat (20) @(posedge clk);
    #1;
    check(st7 == S0_WAIT && pw7 == 0, "idle without sample");

    // edge cases of the division: d = 0, K, K+1, 2K, 2K+1
    update(8'd100, 8'd100);
    update(8'd107, 8'd100);
    update(8'd108, 8'd100);
    update(8'd114, 8'd100);
    update(8'd115, 8'd100);
    update(8'd100, 8'd115);
    // drive pw into the upper clamp, then the lower one
    repeat (4) update(8'd255, 8'd0);
    repeat (4) update(8'd0, 8'd255);
    // random set-points and speeds
    repeat (300) update(byte_t'($urandom), byte_t'($urandom));

    check(n_raise > 0 && n_lower > 0, "both directions exercised");
    check(n_sat_hi > 0, "upper clamp (pw = 255) never hit");
    check(n_sat_lo > 0, "lower clamp (pw = 0) never hit");
    $display("raise=%0d lower=%0d clamp255=%0d clamp0=%0d",
             n_raise, n_lower, n_sat_hi, n_sat_lo);

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
