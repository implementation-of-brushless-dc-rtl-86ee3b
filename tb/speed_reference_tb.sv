// speed_reference_tb: self-checking test of the speed set-point register.
//
// Checks the reset value 0, that random user values are taken only on a load
// strobe and held otherwise, and that values above RMAX (set to 200 here) are
// limited to RMAX.
module speed_reference_tb;
  localparam int RMAX = 200;
  logic       clk = 0;
  logic       rst_n = 0;
  logic       load = 0;
  logic [7:0] user_speed = '0;
  logic [7:0] ref_speed;
  int checks = 0, failures = 0, clipped = 0;
  int model = 0;

  speed_reference #(.RMAX(RMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    user_speed = 8'd99;
    repeat (3) @(negedge clk);
    checks++;
    if (ref_speed !== 8'd0) begin failures++; $display("reset value %0d", ref_speed); end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      user_speed = 8'($urandom);
      load = ($urandom_range(0, 4) == 0);
      @(negedge clk);
      if (load) begin
        model = (user_speed > RMAX) ? RMAX : user_speed;
        if (user_speed > RMAX) clipped++;
      end
      checks++;
      if (ref_speed != 8'(model)) begin
        failures++;
        $display("ref %0d expected %0d", ref_speed, model);
      end
    end
    checks++;
    if (clipped == 0) begin failures++; $display("limit never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
