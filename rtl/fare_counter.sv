// fare_counter: two-digit BCD fare counter with an enable input (the "jifei"
// counter of the original).
//
// The fare starts at the flag-fall value 08 (shi = 0, ge = 8) after reset. On
// each step with enable high it adds one unit, with decimal carry from ge into
// shi; from 99 it returns to 00 and raises the carry c. The very first enabled
// step after reset is swallowed and only arms the counter, so the flag-fall
// fare covers the start of the ride. With enable low a step changes nothing.
// c is lowered by every counting step that does not wrap.
//
// All of this follows the original. This design's choices: step is a
// one-clock enable (the original clocks the counter directly), and the
// swallowed-step counter is a single flag.
// Reset is active low and asynchronous.
module fare_counter
  import taxi_pkg::*;
#(
  parameter bcd_t START_SHI = 4'd0,
  parameter bcd_t START_GE  = 4'd8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  logic enable,
  output bcd_t shi,
  output bcd_t ge,
  output logic c
);

  logic armed;  // first enabled step seen

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shi   <= START_SHI;
      ge    <= START_GE;
      armed <= 1'b0;
      c     <= 1'b0;
    end else if (step && enable) begin
      if (!armed) begin
        armed <= 1'b1;
      end else if (shi == 4'd9 && ge == 4'd9) begin
        shi <= '0;
        ge  <= '0;
        c   <= 1'b1;
      end else if (ge == 4'd9) begin
        shi <= shi + 1'b1;
        ge  <= '0;
        c   <= 1'b0;
      end else begin
        ge <= ge + 1'b1;
        c  <= 1'b0;
      end
    end
  end

  property p_digits_decimal;
    @(posedge clk) disable iff (!rst_n) (shi <= 4'd9) && (ge <= 4'd9);
  endproperty
  a_digits_decimal: assert property (p_digits_decimal);

endmodule
