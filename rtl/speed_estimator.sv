// speed_estimator: actual speed from the Hall change pulses.
//
// Counts Hall-state changes (six per electrical revolution) during a fixed
// gate time of WINDOW clocks and, at the end of every window, loads the count
// into `speed` and pulses `valid` for one clock. Counts above 2**SPEED_W-1 are
// held at that value. At the default WINDOW of 1,000,000 clocks (0.1 s at
// 10 MHz) one unit of `speed` is 10 Hall edges per second, i.e.
// 100/(6*pole_pairs) rpm per unit.
// The document only names this block and gives its 8-bit output; the gate-time
// counting method and the window length are this design's choices.
module speed_estimator #(
  parameter int unsigned SPEED_W = 8,
  parameter int unsigned WINDOW  = 1_000_000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               change,
  output logic [SPEED_W-1:0] speed,
  output logic               valid
);

  localparam int unsigned TW = $clog2(WINDOW);
  localparam logic [SPEED_W-1:0] SMAX = '1;

  logic [TW-1:0]      timer;
  logic [SPEED_W-1:0] count;
  logic               window_end;

  assign window_end = (timer == TW'(WINDOW - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer <= '0;
      count <= '0;
      speed <= '0;
      valid <= 1'b0;
    end else begin
      valid <= window_end;
      if (window_end) begin
        timer <= '0;
        speed <= (change && count != SMAX) ? count + 1'b1 : count;
        count <= '0;
      end else begin
        timer <= timer + 1'b1;
        if (change && count != SMAX) count <= count + 1'b1;
      end
    end
  end

endmodule
