// bldc_controller: closed-loop speed controller for a Hall-sensored BLDC motor.
//
// The complete digital controller between three Hall sensors and the six gate
// signals of a three-phase MOSFET/IGBT bridge:
//
//   hall -> change_detect -> commutation_logic --6--> and_logic -> gates
//                 |  \                              ^   ^
//                 |   `-> dead_band ----------------'   |
//                 `-----> speed_estimator --8--.        |
//   user_speed -> speed_reference --8--> pi_controller --8--> pwm_generator
//
// The commutation logic picks the two phases to energise from the rotor
// sector, the dead band holds all switches off for `dead_time` clocks after
// every sector change, and the PWM chops the energised switches with a duty
// that the PI regulator sets once per PWM period from the difference between
// the reference speed and the measured speed.
//
// Interface: `gates` bit i-1 drives transistor Qi (Q1/Q2 phase A high/low,
// Q3/Q4 phase B, Q5/Q6 phase C); `hall` is {A,B,C}. `dir` = 1 runs the
// clockwise sequence. `user_speed` is taken into the reference on `speed_load`.
// `speed` (measured, new value flagged by `speed_valid`), `ref_speed`, `duty`,
// `speed_error` (the PI input) and `hall_fault` (Hall code 000/111) are status
// outputs.
// Timing: one synchronous clock, CLK_HZ = 10 MHz as in the document; reset is
// synchronous and active low. The gates go off on the second clock edge after
// the one that samples a Hall change (two capture ranks, one output register)
// and show the new pattern `dead_time` clocks later.
// The block structure and widths follow the document's block diagram; the
// output register, the status outputs and the run-time dead time are this
// design's choices.
module bldc_controller
  import bldc_pkg::*;
#(
  parameter int unsigned WINDOW = 1_000_000,  // speed gate time, clocks
  parameter int unsigned FRAC   = 20,         // PI gain fraction bits
  parameter int          KP     = 1048576,    // 1.0
  parameter int          KI     = 121         // 121/2**20 per PWM period
) (
  input  logic   clk,
  input  logic   rst_n,
  input  hall_t  hall,
  input  logic   dir,
  input  speed_t user_speed,
  input  logic   speed_load,
  input  logic [7:0] dead_time,
  output gates_t gates,
  output speed_t speed,
  output speed_t ref_speed,
  output duty_t  duty,
  output logic signed [SPEED_W-1:0] speed_error,
  output logic   speed_valid,
  output logic   hall_fault
);

  hall_t  hall_state;
  logic   change;
  gates_t comm;
  logic   db_en;
  logic   pwm;
  logic   pwm_period;

  change_detect u_change (
    .clk, .rst_n, .hall_in(hall), .hall_state, .change
  );

  commutation_logic u_comm (
    .hall_state, .dir, .comm, .hall_invalid(hall_fault)
  );

  dead_band #(.CNT_W(8)) u_dead (
    .clk, .rst_n, .change, .dead_time, .db_en
  );

  speed_estimator #(.SPEED_W(SPEED_W), .WINDOW(WINDOW)) u_speed (
    .clk, .rst_n, .change, .speed, .valid(speed_valid)
  );

  speed_reference #(.SPEED_W(SPEED_W)) u_ref (
    .clk, .rst_n, .load(speed_load), .user_speed, .ref_speed
  );

  pi_controller #(
    .SPEED_W(SPEED_W), .DUTY_W(DUTY_W), .FRAC(FRAC), .KP(KP), .KI(KI),
    .YMIN(0), .YMAX((1 << DUTY_W) - 1)
  ) u_pi (
    .clk, .rst_n, .update(pwm_period), .ref_speed, .act_speed(speed),
    .duty, .error(speed_error)
  );

  pwm_generator #(.W(DUTY_W)) u_pwm (
    .clk, .rst_n, .duty, .pwm, .period_start(pwm_period)
  );

  and_logic u_and (
    .clk, .rst_n, .comm, .db_en, .pwm, .gates
  );

endmodule
