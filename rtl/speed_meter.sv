// speed_meter: measures the motor speed by counting encoder pulses in a
// fixed time window, once per sampling period.
//
// A frame counter produces the sampling clock Ts-clk: it is high for the
// first TM_CYCLES clocks (the measurement window Tm) of every TS_CYCLES-clock
// sampling period Ts, and low for the rest.  The s_counter is cleared at the
// rising edge of Ts-clk and is enabled by (Ts-clk AND rising edge of SI), so
// it counts encoder pulses only inside the window.  At the falling edge of
// Ts-clk the count is final; its 8 most significant bits are loaded into the
// speed register, which feeds the display.  The window is chosen so that the
// 10-bit count reaches 1024 at full motor speed; passing the top 8 bits gives
// a 0..255 speed and a steadier display.
//
// Interface:
//   si          raw encoder square wave (asynchronous); it passes a two-flop
//               synchroniser and a rising-edge detector.
//   ts_clk      the sampling clock (high during Tm).
//   ts_negedge  one-clock pulse at the falling edge of Ts-clk; s_count is
//               valid and final during this pulse.
//   s_count     8 MSBs of the s_counter (combinational view of the counter).
//   speed       speed register, loaded with s_count at ts_negedge.
//   overflow    one-clock pulse when the counter would pass 1023.
//
// Timing: a new speed appears one clock after ts_negedge, once per Ts.
//
// From the source design: Ts-clk with a Tm-long high phase, reset at its
// rising edge, enable = Ts-clk AND SI rising edge, the speed register loaded
// at its falling edge, the 10-bit count of which 8 MSBs are passed.  Own
// choices: the synchroniser, saturating the counter at 1023 instead of
// letting it wrap, and the window lengths.  TM_CYCLES = 687,500 (27.5 ms) is
// the window that makes the reported closed-loop measurements consistent
// (display 251 at an encoder period of 27.38 us); TS_CYCLES = 1,250,000
// (50 ms, 20 samples per second) is this design's choice of sampling period.
module speed_meter
  import mc_pkg::*;
#(
  parameter int unsigned TS_CYCLES = 1_250_000,
  parameter int unsigned TM_CYCLES = 687_500
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  si,
  output logic  ts_clk,
  output logic  ts_negedge,
  output byte_t s_count,
  output byte_t speed,
  output logic  overflow
);

  localparam int unsigned TS_W = $clog2(TS_CYCLES);

  // Window must fit in the period, with room for the controller afterwards.
  initial begin
    assert (TM_CYCLES > 0 && TM_CYCLES < TS_CYCLES)
      else $error("speed_meter: TM_CYCLES must be in 1..TS_CYCLES-1");
  end

  // --- sampling clock Ts-clk ------------------------------------------------
  logic [TS_W-1:0] ts_cnt;
  logic            ts_posedge;

  always_ff @(posedge clk) begin
    if (!rst_n)                             ts_cnt <= '0;
    else if (ts_cnt == TS_W'(TS_CYCLES - 1)) ts_cnt <= '0;
    else                                    ts_cnt <= ts_cnt + 1'b1;
  end

  assign ts_clk     = (ts_cnt < TS_W'(TM_CYCLES));
  assign ts_posedge = (ts_cnt == '0);
  assign ts_negedge = (ts_cnt == TS_W'(TM_CYCLES));

  // --- encoder input: synchroniser and rising-edge detector ------------------
  logic [2:0] si_sync;
  logic       si_rise;

  always_ff @(posedge clk) begin
    if (!rst_n) si_sync <= '0;
    else        si_sync <= {si_sync[1:0], si};
  end

  assign si_rise = si_sync[1] && !si_sync[2];

  // --- s_counter --------------------------------------------------------------
  logic [SCOUNT_W-1:0] s_cnt;
  logic                s_en;
  logic                s_full;

  assign s_en     = ts_clk && si_rise;
  assign s_full   = (s_cnt == '1);
  assign overflow = s_en && s_full && !ts_posedge;

  always_ff @(posedge clk) begin
    if (!rst_n)                s_cnt <= '0;
    else if (ts_posedge)       s_cnt <= '0;
    else if (s_en && !s_full)  s_cnt <= s_cnt + 1'b1;
  end

  assign s_count = s_cnt[SCOUNT_W-1 -: DATA_W];

  // --- speed register -----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n)          speed <= '0;
    else if (ts_negedge) speed <= s_count;
  end

endmodule
