// commutation_logic: Hall state to six-switch bridge pattern.
//
// Each valid Hall code (1..6) names the 60-degree sector the rotor is in and
// selects which two phases are energised: one phase is tied to +Vdc through
// its high-side switch, one to -Vdc through its low-side switch, and the third
// is left floating. With `dir` = 1 the pattern is the clockwise sequence of the
// document's commutation table:
//
//   Hall A B C | phase A  phase B  phase C | Q6..Q1
//        1 0 0 |  -Vdc     +Vdc     open   | 000110
//        1 0 1 |  open     +Vdc     -Vdc   | 100100
//        0 0 1 |  +Vdc     open     -Vdc   | 100001
//        0 1 1 |  +Vdc     -Vdc     open   | 001001
//        0 1 0 |  open     -Vdc     +Vdc   | 011000
//        1 1 0 |  -Vdc     open     +Vdc   | 010010
//
// Hall codes 000 and 111 cannot occur with healthy sensors; they switch every
// transistor off and raise `hall_invalid`.
// The document says only that running the sequence in reverse turns the motor
// the other way. This design reverses it by swapping the polarity of the two
// energised phases when `dir` = 0, which applies the opposite voltage vector in
// every sector. Purely combinational; no clock.
module commutation_logic
  import bldc_pkg::*;
(
  input  hall_t  hall_state,
  input  logic   dir,
  output gates_t comm,
  output logic   hall_invalid
);

  phase_drive_e pa, pb, pc;

  always_comb begin
    pa = PH_OFF;
    pb = PH_OFF;
    pc = PH_OFF;
    unique case (hall_state)
      3'b100: begin pa = PH_LOW;  pb = PH_HIGH; end
      3'b101: begin pb = PH_HIGH; pc = PH_LOW;  end
      3'b001: begin pa = PH_HIGH; pc = PH_LOW;  end
      3'b011: begin pa = PH_HIGH; pb = PH_LOW;  end
      3'b010: begin pb = PH_LOW;  pc = PH_HIGH; end
      3'b110: begin pa = PH_LOW;  pc = PH_HIGH; end
      default: ;  // 000 and 111: all open
    endcase
    if (!dir) begin
      pa = flip(pa);
      pb = flip(pb);
      pc = flip(pc);
    end
    comm[Q2:Q1] = leg_gates(pa);
    comm[Q4:Q3] = leg_gates(pb);
    comm[Q6:Q5] = leg_gates(pc);
  end

  assign hall_invalid = (hall_state == 3'b000) || (hall_state == 3'b111);

  function automatic phase_drive_e flip(phase_drive_e d);
    unique case (d)
      PH_HIGH: return PH_LOW;
      PH_LOW:  return PH_HIGH;
      default: return PH_OFF;
    endcase
  endfunction

endmodule
