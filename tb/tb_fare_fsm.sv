// tb_fare_fsm: random steps into the state machine; checks after each clock
// that st and y follow the expected sequence: two steps of warm-up with y low,
// then st = 0, 6, 2, 8, 4, 0, ... with y high exactly in the steps that write 0.
// A reset in the middle must restart the warm-up and the ring.
module tb_fare_fsm;
  import taxi_pkg::*;
  logic clk = 1'b0;
  logic a_n = 1'b0;
  logic step = 1'b0;
  logic y;
  bcd_t st;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fare_fsm dut (.clk(clk), .a_n(a_n), .step(step), .y(y), .st(st));

  localparam int RING [5] = '{0, 6, 2, 8, 4};
  int warm = 0, idx = 0, m_st = 0, m_y = 0, y_pulses = 0, nsteps = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s after step %0d: got %0d exp %0d", what, nsteps, got, exp);
    end
  endtask

  task automatic run(int cycles);
    repeat (cycles) begin
      @(negedge clk);
      step = ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (step) begin
        nsteps++;
        if (warm < 2) begin warm++; m_y = 0; end
        else begin
          m_st = RING[idx];
          m_y  = (idx == 0);
          idx  = (idx + 1) % 5;
        end
      end
      #1;
      check("st", st, m_st);
      check("y", y, m_y);
      if (step && y) y_pulses++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) a_n = 1'b1;
    run(200);
    @(negedge clk) begin a_n = 1'b0; step = 1'b0; end
    warm = 0; idx = 0; m_st = 0; m_y = 0;
    #1;
    check("reset st", st, 0);
    check("reset y", y, 0);
    @(negedge clk) a_n = 1'b1;
    run(100);
    check("y pulses seen", int'(y_pulses >= 10), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
