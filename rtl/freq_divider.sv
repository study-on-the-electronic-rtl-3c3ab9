// freq_divider: derives the two time bases of the taximeter from the board
// clock.
//
// From the 50 MHz board clock it makes a 1000 Hz base, which scans the
// display, and a 50 Hz base, which advances the distance pulse counter. Each
// base is a free-running counter that toggles a square wave every half period,
// as in the original divider. Besides the square waves (clk_1000hz,
// clk_50hz) the block gives a one-clock strobe (tick_1000hz, tick_50hz) in the
// cycle each square wave rises. The rest of this design is synchronous to
// clk and uses the strobes as clock enables instead of clocking flip-flops from
// the divided signals; that is this design's choice.
//
// The frequencies, 50 MHz in and 1000 Hz / 50 Hz out, are the original's. Its
// counter limits contradict those names (they would give 50 kHz and 250 Hz);
// this design divides to the named frequencies, i.e. by 50 000 and 1 000 000.
// Reset (active low, asynchronous) clears both counters and both outputs;
// the original only initialises them.
module freq_divider #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned FAST_HZ = 1000,
  parameter int unsigned SLOW_HZ = 50
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_1000hz,
  output logic clk_50hz,
  output logic tick_1000hz,
  output logic tick_50hz
);

  // Clock cycles per half period of each output.
  localparam int unsigned FAST_HALF = CLK_HZ / (2 * FAST_HZ);
  localparam int unsigned SLOW_HALF = CLK_HZ / (2 * SLOW_HZ);
  localparam int unsigned FW = (FAST_HALF > 1) ? $clog2(FAST_HALF) : 1;
  localparam int unsigned SW = (SLOW_HALF > 1) ? $clog2(SLOW_HALF) : 1;

  logic [FW-1:0] fast_cnt;
  logic [SW-1:0] slow_cnt;
  logic          fast_wrap, slow_wrap;

  assign fast_wrap = (fast_cnt == FW'(FAST_HALF - 1));
  assign slow_wrap = (slow_cnt == SW'(SLOW_HALF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fast_cnt    <= '0;
      clk_1000hz  <= 1'b0;
      tick_1000hz <= 1'b0;
    end else begin
      fast_cnt    <= fast_wrap ? '0 : fast_cnt + 1'b1;
      clk_1000hz  <= fast_wrap ? ~clk_1000hz : clk_1000hz;
      tick_1000hz <= fast_wrap & ~clk_1000hz;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slow_cnt  <= '0;
      clk_50hz  <= 1'b0;
      tick_50hz <= 1'b0;
    end else begin
      slow_cnt  <= slow_wrap ? '0 : slow_cnt + 1'b1;
      clk_50hz  <= slow_wrap ? ~clk_50hz : clk_50hz;
      tick_50hz <= slow_wrap & ~clk_50hz;
    end
  end

  initial begin
    assert (FAST_HALF >= 1 && SLOW_HALF >= 1)
      else $error("freq_divider: output frequencies too high for CLK_HZ");
  end

endmodule
