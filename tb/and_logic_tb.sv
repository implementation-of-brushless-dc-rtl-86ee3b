// and_logic_tb: self-checking test of the gate AND stage.
//
// Applies every valid two-switch commutation pattern with all combinations of
// dead-band enable and PWM, plus random single-leg patterns, and checks that
// the registered gates equal comm when both enables are 1 and are all off
// otherwise, one clock after the inputs.
module and_logic_tb;
  import bldc_pkg::*;
  logic   clk = 0;
  logic   rst_n = 0;
  gates_t comm = '0;
  logic   db_en = 0;
  logic   pwm = 0;
  gates_t gates;
  int checks = 0, failures = 0;
  gates_t pats[6] = '{6'b000110, 6'b100100, 6'b100001, 6'b001001, 6'b011000, 6'b010010};

  and_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (gates !== '0) begin failures++; $display("gates on in reset"); end
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      gates_t exp;
      comm  = pats[$urandom_range(0, 5)];
      db_en = 1'($urandom);
      pwm   = 1'($urandom);
      exp   = (db_en && pwm) ? comm : '0;
      @(negedge clk);
      checks++;
      if (gates !== exp) begin
        failures++;
        $display("comm=%b db=%b pwm=%b gates=%b exp %b", comm, db_en, pwm, gates, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
