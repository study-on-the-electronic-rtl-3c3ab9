// tb_freq_divider: checks the divider's square waves and strobes.
//
// A small instance (CLK_HZ 1000, outputs 50 Hz and 5 Hz, i.e. half periods of
// 10 and 100 clocks) is compared cycle by cycle with a model worked out from
// the cycle count since reset: after clock n the wave is (n / HALF) mod 2 and
// the strobe is high when n mod 2*HALF equals HALF. A second instance with the
// default parameters must strobe every 50 000 clocks (1000 Hz) and every
// 1 000 000 clocks (50 Hz).
module tb_freq_divider;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  localparam int FH = 10, SH = 100;
  logic f_clk, s_clk, f_tick, s_tick;
  logic d_fclk, d_sclk, d_ftick, d_stick;

  freq_divider #(.CLK_HZ(1000), .FAST_HZ(50), .SLOW_HZ(5)) dut (
    .clk(clk), .rst_n(rst_n), .clk_1000hz(f_clk), .clk_50hz(s_clk),
    .tick_1000hz(f_tick), .tick_50hz(s_tick));

  freq_divider dut_full (
    .clk(clk), .rst_n(rst_n), .clk_1000hz(d_fclk), .clk_50hz(d_sclk),
    .tick_1000hz(d_ftick), .tick_50hz(d_stick));

  task automatic check(string what, logic got, logic exp, int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at clock %0d: got %b exp %b", what, n, got, exp);
    end
  endtask

  task automatic check_int(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  longint n = 0;
  longint last_f = -1, last_s = -1;
  int f_periods = 0, s_periods = 0;

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    // reset values
    check("reset fast wave", f_clk, 1'b0, 0);
    check("reset slow tick", s_tick, 1'b0, 0);
    @(negedge clk) rst_n = 1'b1;
    while (s_periods < 3) begin
      @(posedge clk);
      n++;
      #1;
      check("fast wave", f_clk, ((n / FH) % 2) == 1, int'(n));
      check("fast tick", f_tick, (n % (2 * FH)) == FH, int'(n));
      check("slow wave", s_clk, ((n / SH) % 2) == 1, int'(n));
      check("slow tick", s_tick, (n % (2 * SH)) == SH, int'(n));
      if (d_ftick) begin
        if (last_f >= 0) begin
          check_int("1000 Hz strobe spacing", n - last_f, 50_000);
          f_periods++;
        end
        last_f = n;
      end
      if (d_stick) begin
        if (last_s >= 0) begin
          check_int("50 Hz strobe spacing", n - last_s, 1_000_000);
          s_periods++;
        end
        last_s = n;
      end
    end
    check_int("1000 Hz periods seen", longint'(f_periods >= 40), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
