// dead_band: dead-time generator.
//
// An 8-bit counter, a comparator and one flip-flop with synchronous reset, as
// the document describes. A `change` pulse from the change detector clears the
// counter and the flip-flop, so the output `db_en` drops to 0 and holds every
// bridge transistor off. The counter then counts up each clock; when it has
// reached `dead_time` the comparator sets the flip-flop again and `db_en`
// returns to 1. The counter stops there until the next change.
//
// Timing: with `change` high in cycle n, `db_en` is 0 for max(dead_time, 1)
// clock cycles starting at cycle n+1. The document asks for at least 0.5 us;
// at the 10 MHz clock that is dead_time = 5, the default the top level uses.
// The count value compared against (`dead_time` as a run-time input) and the
// low state after reset are this design's choices.
module dead_band #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             change,
  input  logic [CNT_W-1:0] dead_time,
  output logic             db_en
);

  logic [CNT_W-1:0] cnt;
  logic             reached;

  assign reached = (cnt >= dead_time);  // comparator

  always_ff @(posedge clk) begin
    if (!rst_n || change) begin
      cnt   <= CNT_W'(1);
      db_en <= 1'b0;
    end else if (!db_en) begin
      if (reached) db_en <= 1'b1;
      else         cnt   <= cnt + 1'b1;
    end
  end

endmodule
