// distance_pulse_counter: turns the 50 Hz time base into half-kilometre steps
// (the "licheng" counter of the original).
//
// A binary counter advances on every tick of the 50 Hz base. When it has
// reached COUNT_MAX (1000) the next tick clears it and raises the carry c,
// which stays high until the following tick; every other tick lowers c. One
// carry therefore stands for half a kilometre travelled, i.e. one step per
// COUNT_MAX + 1 ticks, as in the original, where the carry clocks the distance
// and fare logic.
//
// In this design the carry also comes as a one-clock strobe, step, in the
// clock cycle in which c rises; downstream blocks use step as a clock enable
// (this design's choice, in place of clocking them from c).
// Interface: tick is a one-clock enable; count is the current count.
// Reset is active low and asynchronous, as in the original.
module distance_pulse_counter #(
  parameter int unsigned COUNT_MAX = 1000,
  parameter int unsigned W         = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  output logic [W-1:0] count,
  output logic         c,
  output logic         step
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      c     <= 1'b0;
      step  <= 1'b0;
    end else begin
      step <= 1'b0;
      if (tick) begin
        if (count == W'(COUNT_MAX)) begin
          count <= '0;
          c     <= 1'b1;
          step  <= 1'b1;
        end else if (count < W'(COUNT_MAX)) begin
          count <= count + 1'b1;
          c     <= 1'b0;
        end
      end
    end
  end

  initial begin
    assert (COUNT_MAX < (2 ** W))
      else $error("distance_pulse_counter: COUNT_MAX does not fit in W bits");
  end

endmodule
