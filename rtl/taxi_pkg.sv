// taxi_pkg: types and constants shared by the taximeter blocks.
//
// All displayed quantities in the taximeter are kept as binary-coded decimal
// digits (bcd_t), so the display scanner can show any counter digit without a
// binary-to-decimal converter. The seven-segment encoder below serves the
// display scanner and is reused by the testbenches to decode the segment bus.
//
// Segment convention (this design's choice; the segment code table of the
// original display module is not available): seg[0] = a, seg[1] = b, ...
// seg[6] = g, active low, as for a common-anode display whose decimal point
// and digit enables are also active low.
package taxi_pkg;

  typedef logic [3:0] bcd_t;

  // Distance advances by half a kilometre per step: the tenths digit of the
  // distance alternates between 0 and 5.
  localparam bcd_t DIST_TENTHS_STEP = 4'd5;

  // Active-low seven-segment pattern {g,f,e,d,c,b,a} for a decimal digit.
  // Codes 10..15 are never produced by the counters and show all segments off.
  function automatic logic [6:0] seg7_encode(bcd_t d);
    logic [6:0] on;  // active-high pattern {g,f,e,d,c,b,a}
    unique case (d)
      4'd0:    on = 7'b011_1111;
      4'd1:    on = 7'b000_0110;
      4'd2:    on = 7'b101_1011;
      4'd3:    on = 7'b100_1111;
      4'd4:    on = 7'b110_0110;
      4'd5:    on = 7'b110_1101;
      4'd6:    on = 7'b111_1101;
      4'd7:    on = 7'b000_0111;
      4'd8:    on = 7'b111_1111;
      4'd9:    on = 7'b110_1111;
      default: on = 7'b000_0000;
    endcase
    return ~on;
  endfunction

endpackage
