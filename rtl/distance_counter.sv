// distance_counter: total distance in kilometres as three BCD digits,
// hundreds-of-metres resolution (the "lichengZ" counter of the original).
//
// The distance reads "bai shi . ge" km, after the original's digit names:
// bai is the tens of kilometres, shi the kilometres and ge the tenths, which
// only takes the values 0 and 5 because every step adds half a kilometre. So each step either raises ge from 0 to 5
// or clears ge and carries into shi, shi carrying into bai. From 99.5 km the
// next step returns to 00.0 and raises the carry c. As in the original, c is
// only lowered by a step that carries into shi or bai; a step that only sets
// ge to 5 leaves it as it was, so c stays high for two steps.
//
// Interface: step is a one-clock enable, one per half kilometre. Reset is
// active low and asynchronous and clears all digits and c.
module distance_counter
  import taxi_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output bcd_t bai,
  output bcd_t shi,
  output bcd_t ge,
  output logic c
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bai <= '0;
      shi <= '0;
      ge  <= '0;
      c   <= 1'b0;
    end else if (step) begin
      if (bai == 4'd9 && shi == 4'd9 && ge == DIST_TENTHS_STEP) begin
        bai <= '0;
        shi <= '0;
        ge  <= '0;
        c   <= 1'b1;
      end else if (shi < 4'd9 && ge == DIST_TENTHS_STEP) begin
        shi <= shi + 1'b1;
        ge  <= '0;
        c   <= 1'b0;
      end else if (shi == 4'd9 && ge == DIST_TENTHS_STEP) begin
        bai <= bai + 1'b1;
        shi <= '0;
        ge  <= '0;
        c   <= 1'b0;
      end else begin
        ge <= ge + DIST_TENTHS_STEP;
      end
    end
  end

  // The digits stay decimal and the tenths digit only ever holds 0 or 5.
  property p_digits_legal;
    @(posedge clk) disable iff (!rst_n)
      (bai <= 4'd9) && (shi <= 4'd9) && (ge == '0 || ge == DIST_TENTHS_STEP);
  endproperty
  a_digits_legal: assert property (p_digits_legal);

endmodule
