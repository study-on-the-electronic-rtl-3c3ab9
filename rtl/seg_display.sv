// seg_display: scans eight BCD digits onto a multiplexed seven-segment
// display (the "disp" block of the original).
//
// A 3-bit scan counter advances on every scan tick (1000 Hz in the taximeter,
// so each digit is lit for 1 ms and the display refreshes at 125 Hz). The
// counter value i selects digit i: dig_data drives the one active-low digit
// enable ~(1 << i), seg_data carries the active-low segment pattern of din[i]
// and dp the active-low decimal point of that position. The outputs are
// decoded from the scan counter alone, so they change one clock after a tick.
//
// Follows the original: eight digit inputs, the digit enables 11111110 for
// position 0, 11111101 for 1 and so on, digit i taking din[i], and the
// decimal point lit at position 1 and dark at positions 0 and 2. This design's
// choices: the decimal point is also lit at position 5 (DP_MASK), the segment
// code table and bit order are those of taxi_pkg::seg7_encode, and the scan
// counter is reset (active low, asynchronous) to position 0.
module seg_display
  import taxi_pkg::*;
#(
  parameter logic [7:0] DP_MASK = 8'b0010_0010  // positions with a lit point
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_tick,
  input  bcd_t       din [8],
  output logic       dp,
  output logic [7:0] dig_data,
  output logic [6:0] seg_data
);

  logic [2:0] cnt;
  bcd_t       led_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cnt <= '0;
    else if (scan_tick) cnt <= cnt + 1'b1;
  end

  always_comb begin
    led_code = din[cnt];
    dig_data = ~(8'b1 << cnt);
    dp       = ~DP_MASK[cnt];
    seg_data = seg7_encode(led_code);
  end

  // Exactly one digit is enabled at any time.
  a_one_digit: assert property (@(posedge clk) $onehot(~dig_data));

endmodule
