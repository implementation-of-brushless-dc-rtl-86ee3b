// change_detect_tb: self-checking test of the Hall capture and change detector.
//
// Drives the Hall inputs with random codes that change after random hold times
// and compares `hall_state` and `change` each clock against a reference built
// from a two-deep history of the applied inputs: hall_state must equal the
// input applied two edges earlier, and change must be 1 exactly when the
// inputs applied one and two edges earlier differ.
module change_detect_tb;
  import bldc_pkg::*;

  logic  clk = 0;
  logic  rst_n = 0;
  hall_t hall_in = '0;
  hall_t hall_state;
  logic  change;
  int    checks = 0, failures = 0, changes = 0;
  hall_t h1 = '0, h2 = '0;   // reference history

  change_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      // reference registers update at the same edge as the DUT's
      if (rst_n) begin
        h2 = h1;
        h1 = hall_in;
      end
      #1;
      checks++;
      if (hall_state !== h2 || change !== (h1 != h2)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: hall_state=%b exp %b change=%b exp %b",
                   i, hall_state, h2, change, h1 != h2);
      end
      if (change) changes++;
      if ($urandom_range(0, 3) == 0) hall_in = hall_t'($urandom);
    end
    checks++;
    if (changes < 100) begin
      failures++;
      $display("too few changes seen: %0d", changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
