// tb_fare_counter: random steps and enable; checks the two fare digits and
// the carry against a model holding the fare as a number 0..99 that starts at
// 8, ignores the first enabled step and wraps from 99 to 0 with a carry.
module tb_fare_counter;
  import taxi_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0, enable = 1'b0;
  bcd_t shi, ge;
  logic c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fare_counter dut (.clk(clk), .rst_n(rst_n), .step(step), .enable(enable),
                    .shi(shi), .ge(ge), .c(c));

  int v = 8;
  logic armed = 1'b0, m_c = 1'b0;
  int wraps = 0, held = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at v=%0d: got %0d exp %0d", what, v, got, exp);
    end
  endtask

  task automatic run(int cycles);
    repeat (cycles) begin
      @(negedge clk);
      step   = ($urandom_range(0, 1) == 1);
      enable = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (step && !enable) held++;
      if (step && enable) begin
        if (!armed) armed = 1'b1;
        else if (v == 99) begin v = 0; m_c = 1'b1; wraps++; end
        else begin v++; m_c = 1'b0; end
      end
      #1;
      check("shi", shi, v / 10);
      check("ge", ge, v % 10);
      check("c", c, m_c);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check("reset shi", shi, 0);
    check("reset ge", ge, 8);
    @(negedge clk) rst_n = 1'b1;
    run(1200);
    // second ride: reset restores the flag-fall fare and the swallowed step
    @(negedge clk) rst_n = 1'b0;
    v = 8; armed = 1'b0; m_c = 1'b0;
    #1;
    check("re-reset shi", shi, 0);
    check("re-reset ge", ge, 8);
    @(negedge clk) rst_n = 1'b1;
    run(300);
    check("wraps seen", int'(wraps >= 2), 1);
    check("disabled steps seen", int'(held > 0), 1);
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
