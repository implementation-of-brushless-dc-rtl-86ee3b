// bldc_controller_tb: end-to-end closed-loop test of the BLDC speed controller.
//
// The controller drives a behavioural bridge/motor/Hall model
// (bldc_plant_model) and regulates its speed. Sizes are reduced so the run is
// short: a speed gate time of 16384 clocks (64 PWM periods) and PI gains scaled
// to match (KP = 1.0, KI = 7373/2**20 per PWM period, i.e. the same integral
// gain per speed window as the default configuration). The dead time is 5
// clocks (0.5 us at 10 MHz).
//
// Scenario: start from rest with a reference of 250, above the motor's top
// speed so that the duty must saturate, step down to 150 and to 80, inject the
// invalid Hall codes 000 and 111, reverse the direction at reference 80, then
// command speed 0. Checked throughout: no leg ever has both switches on, every
// energised pattern is the right one for the rotor sector, and between two
// different energised patterns the gates stay off for at least the dead time.
// Checked at the end of each phase: the measured speed is within +/-6 of the
// reference (mean of the last four windows), the gates are off and hall_fault
// is set during an invalid code, the rotor turns backwards after reversal and
// comes to rest at reference 0. Every mechanism (commutation, dead gap, PWM
// chopping, PI update, upper and lower duty limit, speed measurement, invalid
// code, reversal) must be seen at least once.
module bldc_controller_tb;
  import bldc_pkg::*;

  localparam int WINDOW = 16384;
  localparam int FRAC   = 20;
  localparam int KP     = 1048576;
  localparam int KI     = 7373;
  localparam int DEAD   = 5;

  logic   clk = 0;
  logic   rst_n = 0;
  hall_t  hall;
  logic   dir = 1;
  speed_t user_speed = '0;
  logic   speed_load = 0;
  logic [7:0] dead_time = 8'(DEAD);
  gates_t gates;
  speed_t speed, ref_speed;
  duty_t  duty;
  logic signed [7:0] speed_error;
  logic   speed_valid;
  logic   hall_fault;

  logic       force_code = 0;
  logic [2:0] forced = '0;
  int         sector, shoot_through, wrong_pattern, sector_steps;
  longint     omega;
  gates_t     plant_gates;

  // the bridge sees the gate drive only once reset has been applied (before
  // the first clock edge the controller's registers hold arbitrary values)
  assign plant_gates = rst_n ? gates : '0;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_commutations = 0, n_dead_gaps = 0, n_pwm_pulses = 0, n_pi_updates = 0;
  int n_upper_limit = 0, n_lower_limit = 0, n_speed_meas = 0, n_invalid = 0;
  int n_reversal = 0;

  bldc_controller #(.WINDOW(WINDOW), .FRAC(FRAC), .KP(KP), .KI(KI)) dut (.*);

  bldc_plant_model #(.SECTOR_SHIFT(21), .TAU_SHIFT(15), .TORQUE(1)) plant (
    .clk, .gates(plant_gates), .force_code, .forced, .hall, .sector, .omega,
    .shoot_through, .wrong_pattern, .sector_steps
  );

  always #50 clk = ~clk;  // 10 MHz

  initial begin
    #(100.0 * 4_000_000);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- continuous monitors (sampled at negedge) ----------------
  gates_t last_nz = '0;
  gates_t prev_gates = '0;
  int     zrun = 0;
  duty_t  prev_duty = '0;
  int     recent[$];

  always @(negedge clk) begin
    cycle++;
    if (rst_n) begin
      if (gates == '0) zrun++;
      else begin
        if (last_nz != '0 && gates != last_nz) begin
          n_commutations++;
          n_dead_gaps++;
          checks++;
          if (zrun < DEAD) begin
            failures++;
            $display("cycle %0d: only %0d off clocks between %b and %b", cycle, zrun, last_nz, gates);
          end
        end else if (prev_gates == '0 && gates == last_nz) begin
          n_pwm_pulses++;
        end
        zrun = 0;
        last_nz = gates;
      end
      prev_gates = gates;
      if (duty != prev_duty) n_pi_updates++;
      prev_duty = duty;
      if (duty == 8'd255 && speed_error > 0) n_upper_limit++;
      if (duty == 8'd0 && speed_error < 0) n_lower_limit++;
      if (speed_valid) begin
        n_speed_meas++;
        recent.push_back(int'(speed));
        if (recent.size() > 4) void'(recent.pop_front());
      end
    end
  end

  task automatic windows(int n);
    repeat (n * WINDOW) @(negedge clk);
  endtask

  task automatic set_ref(int r);
    @(negedge clk);
    user_speed = 8'(r);
    speed_load = 1;
    @(negedge clk);
    speed_load = 0;
  endtask

  task automatic check_speed(string phase, int r);
    int sum = 0;
    foreach (recent[i]) sum += recent[i];
    checks++;
    if (recent.size() != 4 || sum > 4 * (r + 6) || sum < 4 * (r - 6)) begin
      failures++;
      $display("%s: mean speed %0d/4, expected %0d +/- 6", phase, sum, r);
    end else
      $display("%s: mean speed %0.2f (reference %0d), duty %0d", phase, sum / 4.0, r, duty);
  endtask

  task automatic invalid_code(logic [2:0] code);
    forced = code;
    force_code = 1;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      checks++;
      if (gates != '0 || !hall_fault) begin
        failures++;
        $display("invalid code %b: gates %b hall_fault %b", code, gates, hall_fault);
        break;
      end
      @(negedge clk);
    end
    n_invalid++;
    force_code = 0;
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    windows(2);
    checks++;
    if (sector_steps != 0 || gates != '0) begin
      failures++;
      $display("motor moved with reference 0");
    end

    set_ref(250);       // above the top speed: the duty must saturate
    windows(12);
    checks++;
    if (duty != 8'd255 || speed < 200) begin
      failures++;
      $display("reference 250: duty %0d speed %0d, expected full duty", duty, speed);
    end

    set_ref(150);
    windows(20);
    check_speed("reference 150", 150);

    set_ref(80);
    windows(25);
    check_speed("reference 80", 80);

    invalid_code(3'b000);
    invalid_code(3'b111);

    dir = 0;
    windows(40);
    check_speed("reversed, reference 80", 80);
    checks++;
    if (omega >= 0) begin
      failures++;
      $display("rotor not turning backwards after reversal (omega %0d)", omega);
    end else n_reversal++;

    set_ref(0);
    windows(30);
    checks++;
    if (speed > 3) begin
      failures++;
      $display("motor did not stop: speed %0d", speed);
    end

    // safety counters from the plant
    checks++;
    if (shoot_through != 0 || wrong_pattern != 0) begin
      failures++;
      $display("plant saw %0d shoot-through and %0d wrong-pattern clocks", shoot_through, wrong_pattern);
    end

    $display("mechanisms: commutations %0d dead gaps %0d pwm pulses %0d pi updates %0d",
             n_commutations, n_dead_gaps, n_pwm_pulses, n_pi_updates);
    $display("            upper limit %0d lower limit %0d speed measurements %0d invalid codes %0d reversals %0d",
             n_upper_limit, n_lower_limit, n_speed_meas, n_invalid, n_reversal);
    begin
      automatic int m[9] = '{n_commutations, n_dead_gaps, n_pwm_pulses, n_pi_updates, n_upper_limit,
                   n_lower_limit, n_speed_meas, n_invalid, n_reversal};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
