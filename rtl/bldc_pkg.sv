// bldc_pkg: types and constants shared by the BLDC speed-controller blocks.
//
// The controller drives a six-switch three-phase bridge. Its six transistor
// enables travel as a 6-bit vector in which bit i-1 is transistor Qi: Q1/Q2
// are the high/low switches of the leg feeding phase A, Q3/Q4 of phase B and
// Q5/Q6 of phase C. The Hall state is a 3-bit vector {A,B,C}, with sensor A in
// the most significant bit, written the way the commutation table prints it
// (for example 3'b100 = A high, B and C low). Speeds and the PWM duty are
// 8-bit unsigned numbers, the width printed on the controller block diagram.
package bldc_pkg;

  // Clock of the controller, in Hz.
  localparam int unsigned CLK_HZ = 10_000_000;

  localparam int unsigned SPEED_W = 8;   // speed reference / estimate width
  localparam int unsigned DUTY_W  = 8;   // PWM duty width (8-bit counter)

  typedef logic [2:0]         hall_t;    // {A,B,C}
  typedef logic [5:0]         gates_t;   // bit i-1 = Qi
  typedef logic [SPEED_W-1:0] speed_t;
  typedef logic [DUTY_W-1:0]  duty_t;

  // Bit positions of the six bridge transistors in a gates_t.
  localparam int unsigned Q1 = 0;  // phase A high side
  localparam int unsigned Q2 = 1;  // phase A low side
  localparam int unsigned Q3 = 2;  // phase B high side
  localparam int unsigned Q4 = 3;  // phase B low side
  localparam int unsigned Q5 = 4;  // phase C high side
  localparam int unsigned Q6 = 5;  // phase C low side

  // Drive applied to one phase of the bridge.
  typedef enum logic [1:0] {
    PH_OFF  = 2'b00,  // both switches open (not connected)
    PH_HIGH = 2'b01,  // high-side switch closed: phase at +Vdc
    PH_LOW  = 2'b10   // low-side switch closed: phase at -Vdc
  } phase_drive_e;

  // Gate pair {low, high} for one leg.
  function automatic logic [1:0] leg_gates(phase_drive_e d);
    unique case (d)
      PH_HIGH: return 2'b01;
      PH_LOW:  return 2'b10;
      default: return 2'b00;
    endcase
  endfunction

endpackage
