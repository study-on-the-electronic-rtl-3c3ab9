// tb_seg_display: loads random digits, scans the display and checks every
// position: the active-low digit enable, the segment pattern (decoded with a
// table of this testbench's own) and the decimal point, lit only at
// positions 1 and 5. Digits are changed between scans.
module tb_seg_display;
  import taxi_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic scan_tick = 1'b0;
  bcd_t din [8];
  logic dp;
  logic [7:0] dig_data;
  logic [6:0] seg_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seg_display dut (.clk(clk), .rst_n(rst_n), .scan_tick(scan_tick), .din(din),
                   .dp(dp), .dig_data(dig_data), .seg_data(seg_data));

  // Segments lit (active high, bit 0 = a ... bit 6 = g) per decimal digit.
  localparam logic [6:0] LIT [10] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  int pos = 0, frames = 0;

  initial begin
    foreach (din[i]) din[i] = 4'd0;
    repeat (2) @(posedge clk);
    #1;
    check("reset position", dig_data, 8'hFE);
    @(negedge clk) rst_n = 1'b1;
    repeat (60) begin
      foreach (din[i]) din[i] = 4'($urandom_range(0, 9));
      for (int k = 0; k < 8; k++) begin
        #1;
        check("digit enable", dig_data, 8'(~(8'h01 << pos)));
        check("segments", seg_data, 7'(~LIT[din[pos]]));
        check("decimal point", dp, (pos == 1 || pos == 5) ? 0 : 1);
        // idle a few clocks, then one scan tick
        repeat ($urandom_range(0, 3)) @(posedge clk);
        @(negedge clk) scan_tick = 1'b1;
        @(negedge clk) scan_tick = 1'b0;
        pos = (pos + 1) % 8;
      end
      frames++;
    end
    check("frames", frames, 60);
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
