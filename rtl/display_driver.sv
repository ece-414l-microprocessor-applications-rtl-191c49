// display_driver: shows an 8-bit number (0..255) on a three-digit
// seven-segment display using only seven FPGA pins.
//
// The value is converted to three BCD digits with the shift-and-add-3
// (double dabble) method.  The digits are then time-multiplexed: a single
// 4-bit BCD bus, decoded to segments by an external BCD-to-7-segment chip,
// carries one digit at a time, and one enable wire per digit (3 wires) turns
// on the matching display position.  Each digit is shown for SCAN_CYCLES
// clocks in turn: ones, tens, hundreds.  The value is sampled once per scan
// round, when the ones digit comes up, so all three digits shown in one round
// belong to the same number.
//
// Interface:
//   value     binary number to display.
//   bcd       BCD code of the digit being shown (registered).
//   digit_en  one-hot, active-high: [0] ones, [1] tens, [2] hundreds
//             (registered, changes in the same clock as bcd).  The board
//             inverts these lines before they reach the common electrodes.
//
// From the source design: one shared BCD output plus one enable per digit,
// seven pins in all, multiplexed by the FPGA.  Own choices: the conversion
// method, the scan order, active-high enables at the FPGA pin, no
// leading-zero blanking, and SCAN_CYCLES = 25,000 (1 ms per digit, a 333 Hz
// refresh of the whole display at 25 MHz).
module display_driver
  import mc_pkg::*;
#(
  parameter int unsigned SCAN_CYCLES = 25_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  byte_t      value,
  output logic [3:0] bcd,
  output logic [2:0] digit_en
);

  localparam int unsigned SCAN_W = (SCAN_CYCLES > 1) ? $clog2(SCAN_CYCLES) : 1;

  // --- binary to BCD (double dabble) -----------------------------------------
  logic [11:0] bcd_digits;   // {hundreds, tens, ones}

  always_comb begin
    logic [19:0] sr;           // {hundreds, tens, ones, binary}
    sr = {12'd0, value};
    for (int i = 0; i < DATA_W; i++) begin
      if (sr[11:8]  >= 4'd5) sr[11:8]  = sr[11:8]  + 4'd3;
      if (sr[15:12] >= 4'd5) sr[15:12] = sr[15:12] + 4'd3;
      if (sr[19:16] >= 4'd5) sr[19:16] = sr[19:16] + 4'd3;
      sr = sr << 1;
    end
    bcd_digits = sr[19:8];
  end

  // --- scan timer ------------------------------------------------------------------
  logic [SCAN_W-1:0] scan_cnt;
  logic              step;

  always_ff @(posedge clk) begin
    if (!rst_n)                                scan_cnt <= '0;
    else if (scan_cnt == SCAN_W'(SCAN_CYCLES - 1)) scan_cnt <= '0;
    else                                       scan_cnt <= scan_cnt + 1'b1;
  end

  assign step = (scan_cnt == SCAN_W'(SCAN_CYCLES - 1));

  // --- digit multiplexer -------------------------------------------------------------
  logic [1:0]  digit;        // 0 ones, 1 tens, 2 hundreds
  logic [11:0] shown;        // digits captured for the current round

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      digit    <= 2'd0;
      shown    <= bcd_digits;
      bcd      <= bcd_digits[3:0];
      digit_en <= 3'b001;
    end else if (step) begin
      unique case (digit)
        2'd0: begin
          digit    <= 2'd1;
          bcd      <= shown[7:4];
          digit_en <= 3'b010;
        end
        2'd1: begin
          digit    <= 2'd2;
          bcd      <= shown[11:8];
          digit_en <= 3'b100;
        end
        default: begin
          digit    <= 2'd0;
          shown    <= bcd_digits;
          bcd      <= bcd_digits[3:0];
          digit_en <= 3'b001;
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(digit_en))
    else $error("display_driver: digit enables not one-hot");

endmodule
