// pwm_generator_tb: self-checking test of the 8-bit PWM generator.
//
// For a list of duty values (0, 1, 2, 100, 128, 254, 255 and random ones) it
// measures whole PWM periods between period_start pulses and checks that each
// period is exactly 256 clocks long and that the output is high for exactly
// `duty` of them, in one contiguous run at the start of the period. The duty
// is changed in the middle of a period to check that the running period keeps
// the old value and the new one applies from the next period.
module pwm_generator_tb;
  logic       clk = 0;
  logic       rst_n = 0;
  logic [7:0] duty = '0;
  logic       pwm;
  logic       period_start;
  int         checks = 0, failures = 0;

  pwm_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure one full period that starts after the next period_start pulse
  task automatic measure(input int exp_duty);
    int len = 0, high = 0, edges = 0;
    logic last;
    // wait for the clock whose edge starts a period
    do @(negedge clk); while (!period_start);
    @(negedge clk);
    last = 1'b1;
    do begin
      len++;
      if (pwm) high++;
      if (pwm && !last) edges++;  // a rising edge inside the period
      last = pwm;
      @(negedge clk);
    end while (!period_start);
    // the clock with period_start high is the last one of the period
    len++;
    if (pwm) high++;
    checks++;
    if (len != 256 || high != exp_duty || edges != 0) begin
      failures++;
      $display("duty %0d: period %0d high %0d extra rising edges %0d", exp_duty, len, high, edges);
    end
  endtask

  int list[] = '{0, 1, 2, 100, 128, 254, 255};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (list[i]) begin
      duty = 8'(list[i]);
      measure(list[i]);   // first period after the change may use the old value
      measure(list[i]);
    end
    repeat (10) begin
      int d = $urandom_range(0, 255);
      duty = 8'(d);
      measure(d);
      measure(d);
    end
    // change mid-period: the current period keeps the old duty
    duty = 8'd40;
    measure(40);
    do @(negedge clk); while (!period_start);
    repeat (10) @(negedge clk);
    duty = 8'd200;
    begin
      int high = 0;
      for (int c = 0; c < 245; c++) begin
        if (pwm) high++;
        @(negedge clk);
      end
      checks++;
      if (high != 31) begin  // cycles 9..39 of the period
        failures++;
        $display("mid-period change altered the running period: %0d high", high);
      end
    end
    measure(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
