// change_detect: Hall-sensor capture and change detector.
//
// The three Hall inputs are sampled into a first rank of three D flip-flops on
// every rising clock edge. A second rank holds the previous sample; that rank
// is the Hall state handed to the commutation logic. The two ranks are compared
// bit by bit and any difference gives `change` = 1 for exactly one clock: the
// cycle before the new state reaches `hall_state`. The dead-band counter is
// restarted by that pulse, so the dead time begins on the same clock edge on
// which the commutation pattern switches.
//
// Timing: a Hall edge that is sampled at edge n shows `change` = 1 during the
// cycle after edge n and appears on `hall_state` at edge n+1.
// The two ranks and the XOR comparison follow the document. Reset (synchronous,
// active low, both ranks cleared to 000, an invalid Hall code that keeps the
// bridge off) is this design's choice.
module change_detect
  import bldc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  hall_t hall_in,
  output hall_t hall_state,
  output logic  change
);

  hall_t hall_new;   // first rank: latest sample
  hall_t hall_prev;  // second rank: previous sample

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hall_new  <= '0;
      hall_prev <= '0;
    end else begin
      hall_new  <= hall_in;
      hall_prev <= hall_new;
    end
  end

  assign change     = |(hall_new ^ hall_prev);
  assign hall_state = hall_prev;

endmodule
