// pi_controller: discrete proportional-integral speed regulator.
//
// Once per PWM period (`update` high for one clock) it computes
//
//   e(k)     = ref_speed - act_speed            (saturated to 8-bit signed)
//   yn(k+1)  = yn(k) + KI * e(k)                (integrator)
//   Yn(k+1)  = yn(k+1) + KP * e(k)              (duty before limiting)
//   duty     = Yn(k+1) limited to [YMIN, YMAX]
//
// which are the document's discrete equations and its block diagram (error
// summing junction, proportional and integral paths, output limiter Ymin/Ymax).
// KP and KI are fixed-point gains with FRAC fractional bits: a gain of 1.0 is
// 2**FRAC. The integrator keeps the FRAC fractional bits and is itself held
// inside [YMIN, YMAX] so that it cannot wind up while the output is limited.
// The gain values, the fixed-point format, the error saturation and the
// anti-windup clamp are this design's choices; the document gives none of them.
//
// Timing: `duty` is a register; it takes the new value on the clock edge at
// which `update` is high, i.e. one clock of latency.
module pi_controller #(
  parameter int unsigned SPEED_W = 8,
  parameter int unsigned DUTY_W  = 8,
  parameter int unsigned FRAC    = 20,
  parameter int          KP      = 1048576,  // 1.0
  parameter int          KI      = 121,      // 121/2**20 per PWM period
  parameter int unsigned YMIN    = 0,
  parameter int unsigned YMAX    = 255
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               update,
  input  logic [SPEED_W-1:0] ref_speed,
  input  logic [SPEED_W-1:0] act_speed,
  output logic [DUTY_W-1:0]  duty,
  output logic signed [SPEED_W-1:0] error
);

  localparam int ACC_W = 40;
  localparam logic signed [ACC_W-1:0] LO = ACC_W'(longint'(YMIN) <<< FRAC);
  localparam logic signed [ACC_W-1:0] HI = ACC_W'(longint'(YMAX) <<< FRAC);
  localparam logic signed [SPEED_W:0] EMAX = (SPEED_W+1)'((1 <<< (SPEED_W-1)) - 1);
  localparam logic signed [SPEED_W:0] EMIN = -(SPEED_W+1)'(1 <<< (SPEED_W-1));

  logic signed [ACC_W-1:0] integ;       // yn(k), FRAC fractional bits
  logic signed [ACC_W-1:0] integ_next;  // yn(k+1)
  logic signed [ACC_W-1:0] y_next;      // Yn(k+1)
  logic signed [SPEED_W:0] diff;

  function automatic logic signed [ACC_W-1:0] limit(logic signed [ACC_W-1:0] v);
    if (v < LO) return LO;
    if (v > HI) return HI;
    return v;
  endfunction

  always_comb begin
    diff = $signed({1'b0, ref_speed}) - $signed({1'b0, act_speed});
    if (diff > EMAX)      error = EMAX[SPEED_W-1:0];
    else if (diff < EMIN) error = EMIN[SPEED_W-1:0];
    else                  error = diff[SPEED_W-1:0];
    integ_next = limit(integ + ACC_W'(KI) * ACC_W'(error));
    y_next     = limit(integ_next + ACC_W'(KP) * ACC_W'(error));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ <= LO;
      duty  <= DUTY_W'(YMIN);
    end else if (update) begin
      integ <= integ_next;
      duty  <= DUTY_W'(y_next >>> FRAC);
    end
  end

endmodule
