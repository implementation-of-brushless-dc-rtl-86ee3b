// dead_band_tb: self-checking test of the dead-time generator.
//
// For several dead-time settings (0, 1, 5, 17, 200) it applies a change
// pulse and measures how many clocks db_en stays low; the expected length is
// max(dead_time, 1). It also restarts the dead time with a second change pulse
// while one is running, which must extend the low time to max(dead_time,1)
// clocks after the second pulse, and checks that db_en then stays high.
module dead_band_tb;
  logic       clk = 0;
  logic       rst_n = 0;
  logic       change = 0;
  logic [7:0] dead_time = 8'd5;
  logic       db_en;
  int         checks = 0, failures = 0;

  dead_band dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_and_measure(input int dt, input int restart_after);
    int low = 0;
    int expected;
    dead_time = 8'(dt);
    @(negedge clk) change = 1;
    @(negedge clk) change = 0;
    if (restart_after > 0) begin
      repeat (restart_after - 1) @(negedge clk);
      change = 1;
      @(negedge clk) change = 0;
    end
    // db_en is sampled at negedges: count low cycles after the (last) pulse
    while (db_en == 1'b0 && low < 400) begin
      low++;
      @(negedge clk);
    end
    expected = (dt < 1) ? 1 : dt;
    checks++;
    if (low != expected) begin
      failures++;
      $display("dead_time=%0d restart=%0d: low for %0d clocks, expected %0d",
               dt, restart_after, low, expected);
    end
    repeat (300) begin
      @(negedge clk);
      checks++;
      if (db_en !== 1'b1) begin
        failures++;
        $display("db_en dropped without a change");
        break;
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (db_en !== 1'b1) begin failures++; $display("db_en not set after reset"); end
    pulse_and_measure(5, 0);
    pulse_and_measure(0, 0);
    pulse_and_measure(1, 0);
    pulse_and_measure(17, 0);
    pulse_and_measure(200, 0);
    pulse_and_measure(17, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
