// speed_reference: register for the user's speed set point.
//
// Holds the reference speed the PI controller regulates to. The user value is
// taken when `load` is high and kept until the next load; after reset the
// reference is 0, so the motor stays at rest until a set point is given.
// Values above RMAX are limited to RMAX, so a set point the speed estimate
// cannot represent is never requested.
// The document only names this block ("Speed Reference", fed by the user
// input, 8 bits wide); the load strobe, the reset value and the limit are this
// design's choices.
module speed_reference #(
  parameter int unsigned SPEED_W = 8,
  parameter int unsigned RMAX    = 255
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [SPEED_W-1:0] user_speed,
  output logic [SPEED_W-1:0] ref_speed
);

  always_ff @(posedge clk) begin
    if (!rst_n)    ref_speed <= '0;
    else if (load) ref_speed <= (user_speed > SPEED_W'(RMAX)) ? SPEED_W'(RMAX) : user_speed;
  end

endmodule
