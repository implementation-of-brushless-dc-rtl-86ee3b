// pi_controller_tb: self-checking test of the discrete PI regulator.
//
// Applies random reference and measured speeds and, at random times, an
// update strobe. A reference model in the testbench evaluates the regulator
// equations with 64-bit integers: the error saturated to -128..127, the
// integrator yn += KI*e limited to [YMIN, YMAX] (scaled by 2**FRAC), the output
// Yn = yn + KP*e limited to the same range, and the duty = Yn / 2**FRAC. The
// DUT's duty must match after every update, hold between updates, and reach
// both limits during the run.
module pi_controller_tb;
  localparam int FRAC = 8;
  localparam int KP   = 200;
  localparam int KI   = 37;
  localparam int YMIN = 10;
  localparam int YMAX = 240;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       update = 0;
  logic [7:0] ref_speed = '0;
  logic [7:0] act_speed = '0;
  logic [7:0] duty;
  logic signed [7:0] error;
  int checks = 0, failures = 0, hit_max = 0, hit_min = 0;
  longint integ_m, y_m, e_m, duty_m;

  pi_controller #(.FRAC(FRAC), .KP(KP), .KI(KI), .YMIN(YMIN), .YMAX(YMAX)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint lim(longint v);
    if (v < (longint'(YMIN) << FRAC)) return longint'(YMIN) << FRAC;
    if (v > (longint'(YMAX) << FRAC)) return longint'(YMAX) << FRAC;
    return v;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    integ_m = longint'(YMIN) << FRAC;
    duty_m  = YMIN;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (duty !== 8'(YMIN)) begin failures++; $display("reset duty %0d", duty); end
    for (int i = 0; i < 4000; i++) begin
      // slowly wandering speeds, with occasional jumps
      if ($urandom_range(0, 20) == 0) ref_speed = 8'($urandom);
      if ($urandom_range(0, 20) == 0) act_speed = 8'($urandom);
      else act_speed = act_speed + 8'($urandom_range(0, 2)) - 8'd1;
      update = ($urandom_range(0, 3) == 0);
      e_m = longint'(ref_speed) - longint'(act_speed);
      if (e_m > 127) e_m = 127;
      if (e_m < -128) e_m = -128;
      #1;
      checks++;
      if (longint'(error) != e_m) begin
        failures++;
        if (failures < 10) $display("error %0d exp %0d", error, e_m);
      end
      if (update) begin
        integ_m = lim(integ_m + KI * e_m);
        y_m     = lim(integ_m + KP * e_m);
        duty_m  = y_m >>> FRAC;
      end
      @(negedge clk);
      update = 0;
      checks++;
      if (longint'(duty) != duty_m) begin
        failures++;
        if (failures < 10) $display("step %0d: duty %0d exp %0d", i, duty, duty_m);
      end
      if (duty == YMAX) hit_max++;
      if (duty == YMIN) hit_min++;
    end
    checks++;
    if (hit_max == 0 || hit_min == 0) begin
      failures++;
      $display("limits not exercised: max %0d min %0d", hit_max, hit_min);
    end
    $display("limit hits: max %0d min %0d", hit_max, hit_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
