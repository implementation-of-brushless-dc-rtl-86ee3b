// bldc_commutation_seq_tb: open-loop Hall sequence through the whole controller.
//
// Drives the Hall inputs of a default bldc_controller directly, the way a
// hand-turned rotor would, and checks the gate outputs clock by clock. The
// reference is set to 255 while the rotor is held still, so the PI regulator
// drives the duty to its limit of 255 (PWM off for one clock in 256). Then the
// six clockwise sector codes 100,101,001,011,010,110 are applied twice, each
// held 300 clocks, followed by the counter-clockwise order with dir = 0.
// Checked for every sector step, with the code applied just before clock edge
// n: the old pattern continues through edge n+1, the gates are all off for
// exactly dead_time clocks (edges n+2 .. n+1+D), and from edge n+2+D on they
// show the expected pattern (6, 36, 33, 9, 24, 18 for the six clockwise
// sectors; the polarity-swapped patterns for dir = 0), apart from single PWM
// off clocks. Dead times of 5 and 12 clocks are both run.
module bldc_commutation_seq_tb;
  import bldc_pkg::*;

  logic   clk = 0;
  logic   rst_n = 0;
  hall_t  hall = 3'b100;
  logic   dir = 1;
  speed_t user_speed = 8'd255;
  logic   speed_load = 0;
  logic [7:0] dead_time = 8'd5;
  gates_t gates;
  speed_t speed, ref_speed;
  duty_t  duty;
  logic signed [7:0] speed_error;
  logic   speed_valid;
  logic   hall_fault;

  int checks = 0, failures = 0, steps = 0, pwm_gaps = 0;

  bldc_controller dut (.*);

  always #50 clk = ~clk;

  initial begin
    #(100.0 * 4_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam hall_t  CW_CODES [6] = '{3'b100, 3'b101, 3'b001, 3'b011, 3'b010, 3'b110};
  localparam gates_t CW_GATES [6] = '{6'd6, 6'd36, 6'd33, 6'd9, 6'd24, 6'd18};

  // swap high and low switch of every leg
  function automatic gates_t swap_legs(gates_t g);
    return {g[4], g[5], g[2], g[3], g[0], g[1]};
  endfunction

  // apply a new code just after a negedge, then check the following clocks
  task automatic step(hall_t code, gates_t old_pat, gates_t new_pat, int d);
    @(negedge clk);
    hall = code;
    steps++;
    // edges n and n+1: old pattern (or a PWM gap)
    repeat (2) begin
      @(negedge clk);
      checks++;
      if (gates != old_pat && gates != '0) begin
        failures++;
        $display("step %0d: %b before dead time, expected %b", steps, gates, old_pat);
      end
    end
    // dead time: exactly d clocks off
    repeat (d) begin
      @(negedge clk);
      checks++;
      if (gates != '0) begin
        failures++;
        $display("step %0d: gates %b during dead time", steps, gates);
      end
    end
    // first clock after the dead time must already show the new pattern,
    // unless the PWM is in its single off clock
    for (int i = 0; i < 300 - d - 2; i++) begin
      @(negedge clk);
      checks++;
      if (gates == '0) begin
        pwm_gaps++;
      end else if (gates != new_pat) begin
        failures++;
        $display("step %0d: gates %b expected %b", steps, gates, new_pat);
      end
    end
  endtask

  initial begin
    gates_t cur;
    repeat (5) @(negedge clk);
    rst_n = 1;
    @(negedge clk) speed_load = 1;
    @(negedge clk) speed_load = 0;
    // rotor held in sector 100: the integrator winds up to full duty
    repeat (2_500_000) @(negedge clk);
    checks++;
    if (duty != 8'd255) begin
      failures++;
      $display("duty %0d, expected 255 with the rotor held", duty);
    end
    checks++;
    if (gates != CW_GATES[0] && gates != '0) begin
      failures++;
      $display("held rotor: gates %b", gates);
    end
    cur = CW_GATES[0];
    for (int r = 0; r < 2; r++) begin
      dead_time = (r == 0) ? 8'd5 : 8'd12;
      for (int s = 1; s <= 6; s++) begin
        step(CW_CODES[s % 6], cur, CW_GATES[s % 6], int'(dead_time));
        cur = CW_GATES[s % 6];
      end
    end
    // counter-clockwise: polarity swapped, sectors visited in reverse
    dir = 1'b0;
    dead_time = 8'd5;
    // the pattern flips without a Hall change: wait for it to settle
    repeat (300) @(negedge clk);
    cur = swap_legs(CW_GATES[0]);
    for (int s = 5; s >= 0; s--) begin
      step(CW_CODES[s], cur, swap_legs(CW_GATES[s]), 5);
      cur = swap_legs(CW_GATES[s]);
    end
    checks++;
    if (hall_fault) begin failures++; $display("hall_fault raised on valid codes"); end
    // a hand-turned rotor: PWM gaps are rare at full duty
    checks++;
    if (pwm_gaps > steps * 2) begin
      failures++;
      $display("%0d PWM gaps in %0d steps at full duty", pwm_gaps, steps);
    end
    $display("sector steps %0d, PWM off clocks seen %0d", steps, pwm_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
