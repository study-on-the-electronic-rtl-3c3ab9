// tb_taximeter_top: end-to-end test of the taximeter through its display
// outputs only.
//
// The top runs with shortened time bases (800 Hz clock, 400 Hz scan, 100 Hz
// base, a step every 21 base ticks = 168 clocks) so that hundreds of half-km
// steps fit in a short simulation. The testbench decodes dig_data, seg_data and
// dp with its own segment table and compares every displayed digit with a
// reference worked out from time alone: the clock count at which step k
// happens, and from k the distance (k mod 200 half kilometres), the tenths
// digit of the fare (ring 0, 6, 2, 8, 4 after two warm-up steps) and the fare
// (8 plus one per enabled step, the first enabled step being swallowed).
// It also checks the scan order and the two decimal points.
//
// A short first ride is cut by a reset; the second ride runs 520 steps, so the
// distance passes 99.5 km and the fare passes 99. The testbench counts each
// mechanism it saw on the display and fails if one never happened.
module tb_taximeter_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic dp;
  logic [7:0] dig_data;
  logic [6:0] seg_data;
  int checks = 0, failures = 0;

  localparam int CLK_HZ = 800, SCAN_HZ = 400, BASE_HZ = 100, CM = 20;
  localparam int SH = CLK_HZ / (2 * SCAN_HZ);   // scan half period, clocks
  localparam int BH = CLK_HZ / (2 * BASE_HZ);   // base half period, clocks

  always #5 clk = ~clk;

  taximeter_top #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ), .BASE_HZ(BASE_HZ),
                  .COUNT_MAX(CM)) dut (
    .clk(clk), .rst_n(rst_n), .dp(dp), .dig_data(dig_data), .seg_data(seg_data));

  localparam logic [6:0] LIT [10] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
  localparam int RING [5] = '{0, 6, 2, 8, 4};

  function automatic int decode(logic [6:0] seg);
    for (int i = 0; i < 10; i++) if (seg == 7'(~LIT[i])) return i;
    return -1;
  endfunction

  // Clock count (after reset release) at whose edge step k is flagged.
  function automatic longint step_clock(int k);
    return longint'(BH) + (longint'(k) * (CM + 1) - 1) * 2 * BH + 1;
  endfunction

  // Expected display digits after k steps, position 0..7.
  function automatic int expect_digit(int k, int pos);
    int d, e, fare;
    d = k % 200;
    e = (k >= 4) ? (k - 4) / 5 + 1 : 0;
    fare = (8 + ((e > 0) ? e - 1 : 0)) % 100;
    case (pos)
      0: return (k < 3) ? 0 : RING[(k - 3) % 5];
      1: return fare % 10;
      2: return fare / 10;
      4: return 5 * (d % 2);
      5: return (d / 2) % 10;
      6: return d / 20;
      default: return 0;
    endcase
  endfunction

  task automatic check(string what, int got, int exp, longint n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at clock %0d: got %0d exp %0d", what, n, got, exp);
    end
  endtask

  // mechanism counters
  int seen_steps = 0, seen_km_carry = 0, seen_tens_carry = 0, seen_dist_wrap = 0;
  int seen_fare_inc = 0, seen_fare_carry = 0, seen_fare_wrap = 0, seen_swallow = 0;
  int seen_warmup = 0, seen_ring [5] = '{0, 0, 0, 0, 0}, seen_reset = 0, seen_dp = 0;
  int shown [8];

  // Run one ride of nsteps steps, checking every displayed digit.
  task automatic ride(int nsteps);
    longint n = 0;
    int k = 0, pos, got, exp_pos;
    @(negedge clk) rst_n = 1'b1;
    while (k < nsteps) begin
      @(posedge clk);
      n++;
      #1;
      // steps flagged at edge step_clock(k) reach the digits two edges later
      while (n >= step_clock(k + 1) + 1) begin
        k++;
        seen_steps++;
        if (k % 2 == 0 && k % 200 != 0) seen_km_carry++;
        if (k % 20 == 0 && k % 200 != 0) seen_tens_carry++;
        if (k % 200 == 0) seen_dist_wrap++;
        if (k == 4) seen_swallow++;
        if (k <= 2) seen_warmup++;
        if (k >= 3) seen_ring[(k - 3) % 5]++;
        if (k >= 9 && (k - 4) % 5 == 0) begin
          seen_fare_inc++;
          if (expect_digit(k, 1) == 0) seen_fare_carry++;
          if (expect_digit(k, 1) == 0 && expect_digit(k, 2) == 0) seen_fare_wrap++;
        end
      end
      // scan position from the clock count: scan ticks flagged at edges
      // SH, 3SH, 5SH, ... move the position one edge later
      exp_pos = (n - 1 >= SH) ? int'(((n - 1 - SH) / (2 * SH) + 1) % 8) : 0;
      pos = -1;
      for (int i = 0; i < 8; i++) if (dig_data == 8'(~(8'h01 << i))) pos = i;
      check("scan position", pos, exp_pos, n);
      if (pos < 0) continue;
      check("decimal point", dp, (pos == 1 || pos == 5) ? 0 : 1, n);
      if (!dp) seen_dp++;
      got = decode(seg_data);
      // skip the clock in which a step is still on its way to the digits
      if (n == step_clock(k + 1) || n == step_clock(k + 1) - 1) continue;
      check($sformatf("digit %0d (step %0d)", pos, k), got, expect_digit(k, pos), n);
      shown[pos]++;
    end
  endtask

  initial begin
    foreach (shown[i]) shown[i] = 0;
    repeat (3) @(posedge clk);
    #1;
    check("reset digit enable", dig_data, 8'hFE, 0);
    check("reset display", decode(seg_data), 0, 0);
    ride(30);
    // a reset in mid-ride clears distance and fare
    @(negedge clk) rst_n = 1'b0;
    seen_reset++;
    repeat (2) @(posedge clk);
    ride(520);
    $display("mechanisms: steps=%0d km_carry=%0d tens_carry=%0d dist_wrap=%0d",
             seen_steps, seen_km_carry, seen_tens_carry, seen_dist_wrap);
    $display("            fare_inc=%0d fare_carry=%0d fare_wrap=%0d swallowed=%0d",
             seen_fare_inc, seen_fare_carry, seen_fare_wrap, seen_swallow);
    $display("            warmup=%0d ring=%0d/%0d/%0d/%0d/%0d reset=%0d dp=%0d",
             seen_warmup, seen_ring[0], seen_ring[1], seen_ring[2], seen_ring[3],
             seen_ring[4], seen_reset, seen_dp);
    check("step seen", int'(seen_steps > 0), 1, 0);
    check("km carry seen", int'(seen_km_carry > 0), 1, 0);
    check("tens-of-km carry seen", int'(seen_tens_carry > 0), 1, 0);
    check("distance wrap seen", int'(seen_dist_wrap > 0), 1, 0);
    check("fare increment seen", int'(seen_fare_inc > 0), 1, 0);
    check("fare carry seen", int'(seen_fare_carry > 0), 1, 0);
    check("fare wrap seen", int'(seen_fare_wrap > 0), 1, 0);
    check("swallowed first enabled step seen", int'(seen_swallow > 0), 1, 0);
    check("warm-up seen", int'(seen_warmup > 0), 1, 0);
    foreach (seen_ring[i]) check("ring state seen", int'(seen_ring[i] > 0), 1, 0);
    check("mid-ride reset seen", int'(seen_reset > 0), 1, 0);
    check("decimal point seen", int'(seen_dp > 0), 1, 0);
    foreach (shown[i]) check("position shown", int'(shown[i] > 0), 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
