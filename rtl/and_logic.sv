// and_logic: final gating of the six bridge transistors.
//
// Each commutation output is ANDed with the dead-band enable and the PWM
// signal, as the document describes, and the result is registered so that the
// gate drivers see glitch-free levels. A transistor is on only when the rotor
// sector calls for it, no dead time is running and the PWM is in its on phase.
// An immediate assertion checks that the two switches of one bridge leg are
// never on together (which would short the supply).
// The output register (one clock of latency) is this design's addition.
module and_logic
  import bldc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  gates_t comm,
  input  logic   db_en,
  input  logic   pwm,
  output gates_t gates
);

  gates_t gates_d;

  assign gates_d = comm & {6{db_en & pwm}};

  always_ff @(posedge clk) begin
    if (!rst_n) gates <= '0;
    else        gates <= gates_d;
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(gates_d[Q1] && gates_d[Q2]) && !(gates_d[Q3] && gates_d[Q4]) &&
              !(gates_d[Q5] && gates_d[Q6]))
        else $error("and_logic: both switches of one bridge leg enabled");
    end
  end

endmodule
