// tb_distance_counter: gives random half-kilometre steps and checks the three
// distance digits and the carry against a model that keeps the distance as a
// number of half kilometres d (0..199): bai = d / 20, shi = (d / 2) mod 10,
// ge = 5 * (d mod 2). The run passes 99.5 km twice, so the wrap to 00.0 and
// its carry are exercised.
module tb_distance_counter;
  import taxi_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  bcd_t bai, shi, ge;
  logic c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  distance_counter dut (.clk(clk), .rst_n(rst_n), .step(step),
                        .bai(bai), .shi(shi), .ge(ge), .c(c));

  int d = 0;
  logic m_c = 1'b0;
  int wraps = 0, bai_carries = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at d=%0d: got %0d exp %0d", what, d, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (1500) begin
      @(negedge clk);
      step = ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (step) begin
        if (d == 199) begin
          d = 0; m_c = 1'b1; wraps++;
        end else if (d % 2 == 1) begin
          if ((d + 1) % 20 == 0) bai_carries++;
          d++; m_c = 1'b0;
        end else begin
          d++;
        end
      end
      #1;
      check("bai", bai, d / 20);
      check("shi", shi, (d / 2) % 10);
      check("ge", ge, 5 * (d % 2));
      check("c", c, m_c);
    end
    check("wraps seen", int'(wraps >= 2), 1);
    check("bai carries seen", int'(bai_carries >= 9), 1);
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
