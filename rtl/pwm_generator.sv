// pwm_generator: 8-bit down-counter PWM.
//
// Built from the parts the document lists: an 8-bit down-counter, a zero
// detector, a D flip-flop and an SR flip-flop. The D flip-flop (`duty_q`)
// captures the requested duty at the start of every PWM period, so a new duty
// never cuts a period short. The SR flip-flop is the PWM output. Each period
// has an on phase and an off phase, each timed by loading the counter and
// letting it count down to zero:
//
//   period start : duty_q <= duty; if duty != 0 set SR, counter <= duty-1
//                                  else          counter <= 2^W-1 (off only)
//   on phase     : counter hits zero -> reset SR, counter <= 2^W-1-duty_q
//   off phase    : counter hits zero -> next period start
//
// So the period is always 2^W clocks (256 at W = 8, 25.6 us at 10 MHz) and the
// output is high for exactly `duty` clocks of it (duty 0 = always low, 255 =
// high 255 of 256 clocks). `period_start` is high for one clock, the last clock
// of each period (and the first clock after reset); the new period, with the
// duty sampled at that edge, begins at the following clock edge. The PI
// controller uses it to update once per PWM cycle.
// The load values and the two-phase use of one counter are this design's way
// of meeting the listed parts; the document does not give the wiring.
module pwm_generator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] duty,
  output logic         pwm,
  output logic         period_start
);

  logic [W-1:0] cnt;
  logic [W-1:0] duty_q;   // D flip-flop: duty held for the current period
  logic         on_phase; // SR flip-flop state (= pwm)
  logic         zero;     // zero detector
  logic         started;  // first period begins right after reset

  assign zero         = (cnt == '0);
  assign period_start = !started || (zero && !on_phase);
  assign pwm          = on_phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      duty_q   <= '0;
      on_phase <= 1'b0;
      started  <= 1'b0;
    end else if (period_start) begin
      started <= 1'b1;
      duty_q  <= duty;
      if (duty != '0) begin
        on_phase <= 1'b1;            // set
        cnt      <= duty - 1'b1;
      end else begin
        on_phase <= 1'b0;
        cnt      <= '1;
      end
    end else if (zero) begin         // end of on phase
      on_phase <= 1'b0;              // reset
      cnt      <= ~duty_q;           // 2^W-1-duty_q
    end else begin
      cnt <= cnt - 1'b1;
    end
  end

endmodule
