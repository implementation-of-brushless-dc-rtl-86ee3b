// commutation_logic_tb: exhaustive test of the Hall-to-bridge mapping.
//
// The expected pattern is built from a per-phase voltage table (+Vdc, -Vdc or
// open for phases A, B, C in each of the six sectors, clockwise), converted
// here to switch enables: +Vdc closes the leg's high switch (Q1/Q3/Q5), -Vdc
// its low switch (Q2/Q4/Q6). For the reverse direction every +/- is swapped.
// All eight Hall codes and both directions are applied; codes 000 and 111 must
// give all switches open and raise hall_invalid.
module commutation_logic_tb;
  import bldc_pkg::*;

  hall_t  hall_state;
  logic   dir;
  gates_t comm;
  logic   hall_invalid;
  int     checks = 0, failures = 0;

  commutation_logic dut (.*);

  // phase voltage per sector: +1, -1 or 0, for A, B, C
  function automatic void table_row(input hall_t h, output int va, output int vb, output int vc);
    va = 0; vb = 0; vc = 0;
    case (h)
      3'b100: begin va = -1; vb = +1; vc =  0; end
      3'b101: begin va =  0; vb = +1; vc = -1; end
      3'b001: begin va = +1; vb =  0; vc = -1; end
      3'b011: begin va = +1; vb = -1; vc =  0; end
      3'b010: begin va =  0; vb = -1; vc = +1; end
      3'b110: begin va = -1; vb =  0; vc = +1; end
      default: ;
    endcase
  endfunction

  function automatic gates_t expect_gates(hall_t h, logic d);
    int v[3];
    gates_t g = '0;
    table_row(h, v[0], v[1], v[2]);
    for (int p = 0; p < 3; p++) begin
      if (!d) v[p] = -v[p];
      if (v[p] > 0) g[2*p]   = 1'b1;
      if (v[p] < 0) g[2*p+1] = 1'b1;
    end
    return g;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++) begin
      for (int h = 0; h < 8; h++) begin
        hall_state = hall_t'(h);
        dir = d[0];
        #10;
        checks++;
        if (comm !== expect_gates(hall_state, dir)) begin
          failures++;
          $display("hall=%b dir=%b comm=%b exp %b", hall_state, dir, comm,
                   expect_gates(hall_state, dir));
        end
        checks++;
        if (hall_invalid !== (h == 0 || h == 7)) begin
          failures++;
          $display("hall=%b hall_invalid=%b", hall_state, hall_invalid);
        end
        // a valid sector energises exactly two switches on different legs
        checks++;
        if (h != 0 && h != 7 && ($countones(comm) != 2 ||
            (comm[0] & comm[1]) || (comm[2] & comm[3]) || (comm[4] & comm[5]))) begin
          failures++;
          $display("hall=%b bad pattern %b", hall_state, comm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
