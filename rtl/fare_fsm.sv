// fare_fsm: the taximeter state machine (the "jifei1" / "zhuangtaiji" block of
// the original).
//
// It walks a ring of five states, one per step (half kilometre):
//   S0 -> S6 -> S2 -> S8 -> S4 -> S0 ...
// Each state is named after the digit it writes to st, the tenths digit of the
// fare shown on the display: 0, 6, 2, 8, 4. Entering the ring from S0 also
// raises y for one step; y is the enable of the fare counter. Before the ring
// starts, the machine waits WARMUP (2) steps after reset, holding y low. st and
// y are registered: in each step the machine writes the digit and y that
// belong to the state it is leaving.
//
// Follows the original: the state names and their order in the ring, the
// digits, y high in S0, the two-step wait, and reset by the active-low input
// (a_n, called A in the original), which returns to S0 with st = 0. This
// design's choices: y is low in every state except S0, reset also clears y,
// and step is a one-clock enable instead of a clock.
module fare_fsm
  import taxi_pkg::*;
#(
  parameter int unsigned WARMUP = 2
) (
  input  logic clk,
  input  logic a_n,
  input  logic step,
  output logic y,
  output bcd_t st
);

  typedef enum logic [2:0] {S0, S6, S2, S8, S4} state_t;

  state_t state;
  logic [$clog2(WARMUP + 1)-1:0] warm;

  always_ff @(posedge clk or negedge a_n) begin
    if (!a_n) begin
      warm  <= '0;
      state <= S0;
      st    <= 4'd0;
      y     <= 1'b0;
    end else if (step) begin
      if (warm < $bits(warm)'(WARMUP)) begin
        warm <= warm + 1'b1;
        y    <= 1'b0;
      end else begin
        unique case (state)
          S0: begin st <= 4'd0; y <= 1'b1; state <= S6; end
          S6: begin st <= 4'd6; y <= 1'b0; state <= S2; end
          S2: begin st <= 4'd2; y <= 1'b0; state <= S8; end
          S8: begin st <= 4'd8; y <= 1'b0; state <= S4; end
          S4: begin st <= 4'd4; y <= 1'b0; state <= S0; end
          default: begin st <= 4'd0; y <= 1'b0; state <= S0; end
        endcase
      end
    end
  end

  // st only ever shows one of the five ring digits.
  property p_st_legal;
    @(posedge clk) disable iff (!a_n)
      st inside {4'd0, 4'd6, 4'd2, 4'd8, 4'd4};
  endproperty
  a_st_legal: assert property (p_st_legal);

endmodule
