// taximeter_top: a digital taximeter that shows distance travelled and fare
// on an eight-digit seven-segment display.
//
// Data flow (one clock domain, clk = 50 MHz board clock):
//   freq_divider            50 MHz -> 1000 Hz scan tick and 50 Hz base tick
//   distance_pulse_counter  COUNT_MAX + 1 base ticks = one half-km step
//   distance_counter        steps -> distance "bai shi . ge" km (BCD)
//   fare_fsm                steps -> fare tenths digit st, fare enable y
//   fare_counter            steps with y -> fare "shi ge" units, starts at 08
//   seg_display             scans the digits onto the display
//
// Display positions (position 0 is enabled by dig_data[0]):
//   7: blank 0  6: distance bai  5: distance shi (point lit)  4: distance ge
//   3: blank 0  2: fare shi      1: fare ge (point lit)       0: fare tenths st
// so the left half reads the distance as 0XX.X km and the right half the fare
// as 0XX.X.
//
// The blocks, the time bases, the step of 1001 base ticks driving the
// distance counter, the state machine's y driving the fare counter's enable,
// the shared active-low reset and the display outputs follow the original's
// block diagram. That the fare counter and the state machine also advance on
// the step, which digit goes to which display position, the blank positions
// 3 and 7, and driving every block from clk with enables instead of from
// divided clocks are this design's choices. The carries of the distance and fare counters and the raw
// count of the pulse counter are left unconnected, as in the original.
module taximeter_top
  import taxi_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SCAN_HZ   = 1000,
  parameter int unsigned BASE_HZ   = 50,
  parameter int unsigned COUNT_MAX = 1000
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       dp,
  output logic [7:0] dig_data,
  output logic [6:0] seg_data
);

  logic tick_scan, tick_base, clk_scan, clk_base;
  logic step;
  logic [9:0] base_count;
  logic pulse_c, dist_c, fare_c;
  bcd_t dist_bai, dist_shi, dist_ge;
  bcd_t fare_shi, fare_ge, fare_tenths;
  logic fare_en;
  bcd_t digits [8];

  freq_divider #(
    .CLK_HZ (CLK_HZ),
    .FAST_HZ(SCAN_HZ),
    .SLOW_HZ(BASE_HZ)
  ) u_div (
    .clk        (clk),
    .rst_n      (rst_n),
    .clk_1000hz (clk_scan),
    .clk_50hz   (clk_base),
    .tick_1000hz(tick_scan),
    .tick_50hz  (tick_base)
  );

  distance_pulse_counter #(
    .COUNT_MAX(COUNT_MAX),
    .W        (10)
  ) u_pulse (
    .clk  (clk),
    .rst_n(rst_n),
    .tick (tick_base),
    .count(base_count),
    .c    (pulse_c),
    .step (step)
  );

  distance_counter u_dist (
    .clk  (clk),
    .rst_n(rst_n),
    .step (step),
    .bai  (dist_bai),
    .shi  (dist_shi),
    .ge   (dist_ge),
    .c    (dist_c)
  );

  fare_fsm u_fsm (
    .clk (clk),
    .a_n (rst_n),
    .step(step),
    .y   (fare_en),
    .st  (fare_tenths)
  );

  fare_counter u_fare (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .enable(fare_en),
    .shi   (fare_shi),
    .ge    (fare_ge),
    .c     (fare_c)
  );

  always_comb begin
    digits[0] = fare_tenths;
    digits[1] = fare_ge;
    digits[2] = fare_shi;
    digits[3] = 4'd0;
    digits[4] = dist_ge;
    digits[5] = dist_shi;
    digits[6] = dist_bai;
    digits[7] = 4'd0;
  end

  seg_display #(
    .DP_MASK(8'b0010_0010)
  ) u_disp (
    .clk      (clk),
    .rst_n    (rst_n),
    .scan_tick(tick_scan),
    .din      (digits),
    .dp       (dp),
    .dig_data (dig_data),
    .seg_data (seg_data)
  );

endmodule
