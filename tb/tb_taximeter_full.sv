// tb_taximeter_full: one half-kilometre step of the taximeter at its real
// time bases (50 MHz clock, 1000 Hz scan, 50 Hz base, 1001 base ticks per
// step), observed through the display outputs.
//
// After reset the display must read distance 00.0 and fare 08.0. The first
// step comes 1001 x 1 000 000 clocks (20.02 s) after reset; the testbench reads
// whole display frames just before and just after that moment and expects
// distance 00.5 with the fare unchanged (the state machine is still in its
// two-step warm-up). It also checks that the scan moves to the next digit
// every 50 000 clocks (1 ms). The clocks in between are simulated without
// looking at the outputs. About 1e9 clocks: this takes minutes.
module tb_taximeter_full;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic dp;
  logic [7:0] dig_data;
  logic [6:0] seg_data;
  int checks = 0, failures = 0;

  localparam longint SH = 25_000;        // scan half period, clocks
  localparam longint BH = 500_000;       // base half period, clocks
  localparam longint STEP1 = BH + (1001 - 1) * 2 * BH + 1;  // edge flagging step 1

  always #5 clk = ~clk;

  taximeter_top dut (.clk(clk), .rst_n(rst_n), .dp(dp), .dig_data(dig_data),
                     .seg_data(seg_data));

  localparam logic [6:0] LIT [10] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  function automatic int decode(logic [6:0] seg);
    for (int i = 0; i < 10; i++) if (seg == 7'(~LIT[i])) return i;
    return -1;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  longint t0;  // time of the clock edge numbered 0 (reset release)

  // Advance to just after clock edge n (counted from reset release).
  task automatic goto_edge(longint n);
    longint target = t0 + 10 * n + 1;
    if (target > $time) #(target - $time);
  endtask

  // Sample the display once per scan slot for one frame starting at edge n,
  // and compare the eight digits with exp (position 0 first).
  task automatic read_frame(longint n, int exp [8], string tag);
    int pos, seen = 0;
    for (int s = 0; s < 8; s++) begin
      goto_edge(n + s * 2 * SH);
      pos = -1;
      for (int i = 0; i < 8; i++) if (dig_data == 8'(~(8'h01 << i))) pos = i;
      if (pos < 0) begin
        check({tag, " digit enable one-hot"}, 0, 1);
        continue;
      end
      check($sformatf("%s digit %0d", tag, pos), decode(seg_data), exp[pos]);
      check($sformatf("%s decimal point %0d", tag, pos), dp, (pos == 1 || pos == 5) ? 0 : 1);
      seen |= 1 << pos;
    end
    check({tag, " all positions shown"}, seen, 255);
  endtask

  int exp_before [8] = '{0, 8, 0, 0, 0, 0, 0, 0};   // 00.0 km, fare 08.0
  int exp_after  [8] = '{0, 8, 0, 0, 5, 0, 0, 0};   // 00.5 km, fare 08.0
  logic [7:0] prev;
  longint moves;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    t0 = $time - 5;   // next rising edge is edge 1
    // scan rate: the digit enable changes exactly every 2*SH clocks
    goto_edge(1);
    prev = dig_data;
    moves = 0;
    for (longint n = 2; n <= 8 * 2 * SH + SH; n++) begin
      goto_edge(n);
      if (dig_data != prev) begin
        moves++;
        check("scan moves on its period", (n - 1 - SH) % (2 * SH), 0);
      end
      prev = dig_data;
    end
    check("scan moves in 8.5 periods", moves, 8);
    read_frame(9 * 2 * SH + 100, exp_before, "after reset");
    // the last full frame before the first step, and the first after it
    read_frame(STEP1 - 8 * 2 * SH - 10, exp_before, "before step");
    read_frame(STEP1 + 10, exp_after, "after step");
    $display("first step at clock %0d = %0d base periods", STEP1, (STEP1 - BH - 1) / (2 * BH) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #11_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
