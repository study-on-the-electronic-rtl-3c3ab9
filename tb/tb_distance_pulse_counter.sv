// tb_distance_pulse_counter: drives the 50 Hz tick input at random and checks
// the count, the carry level c and the step strobe against a model of the
// counter, with the default COUNT_MAX of 1000. Every step must come exactly
// 1001 ticks after the previous one.
module tb_distance_pulse_counter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick = 1'b0;
  logic [9:0] count;
  logic c, step;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  distance_pulse_counter dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .count(count), .c(c), .step(step));

  int m_count = 0;
  logic m_c = 1'b0, m_step = 1'b0;
  int ticks = 0, last_step_tick = -1, steps = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at tick %0d: got %0d exp %0d", what, ticks, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check("reset count", count, 0);
    check("reset c", c, 0);
    @(negedge clk) rst_n = 1'b1;
    repeat (12000) begin
      @(negedge clk);
      tick = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      // model
      m_step = 1'b0;
      if (tick) begin
        ticks++;
        if (m_count == 1000) begin
          m_count = 0; m_c = 1'b1; m_step = 1'b1;
        end else begin
          m_count++; m_c = 1'b0;
        end
      end
      #1;
      check("count", count, m_count);
      check("c", c, m_c);
      check("step", step, m_step);
      if (step) begin
        steps++;
        if (last_step_tick >= 0) check("ticks per step", ticks - last_step_tick, 1001);
        last_step_tick = ticks;
      end
    end
    check("steps seen", int'(steps >= 5), 1);
    // reset in the middle of a count
    rst_n = 1'b0;
    #1;
    check("async reset count", count, 0);
    check("async reset c", c, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
