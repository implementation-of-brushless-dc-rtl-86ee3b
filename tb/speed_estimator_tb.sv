// speed_estimator_tb: self-checking test of the gate-time speed estimator.
//
// With a short gate time (WINDOW = 1000 clocks) it sends a known number of
// change pulses into each window, at random positions, and checks the value
// published at the end of the window, the one-clock `valid` pulse and the
// 1000-clock spacing of those pulses. One window receives 300 pulses to check
// that the count holds at 255.
module speed_estimator_tb;
  localparam int WINDOW = 1000;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       change = 0;
  logic [7:0] speed;
  logic       valid;
  int checks = 0, failures = 0;
  int cycle = 0, last_valid = -1;
  int sent[$];

  speed_estimator #(.WINDOW(WINDOW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse generator: window w gets sent[w] pulses; windows are aligned to reset
  int plan[8] = '{0, 7, 120, 255, 300, 1, 60, 33};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 8; w++) begin
      automatic bit mark[WINDOW] = '{default: 1'b0};
      automatic int n = plan[w];
      automatic int placed = 0;
      // mark n distinct cycles of this window
      while (placed < n && placed < WINDOW) begin
        automatic int c = $urandom_range(0, WINDOW - 1);
        if (!mark[c]) begin
          mark[c] = 1'b1;
          placed++;
        end
      end
      for (int c = 0; c < WINDOW; c++) begin
        change = mark[c];
        @(negedge clk);
      end
      sent.push_back(n > 255 ? 255 : n);
    end
    change = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d windows not reported", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n && valid) begin
      checks++;
      if (sent.size() == 0) begin
        failures++;
        $display("valid without a finished window");
      end else begin
        automatic int e = sent.pop_front();
        if (speed != 8'(e)) begin
          failures++;
          $display("speed %0d expected %0d", speed, e);
        end
      end
      if (last_valid >= 0) begin
        checks++;
        if (cycle - last_valid != WINDOW) begin
          failures++;
          $display("valid spacing %0d", cycle - last_valid);
        end
      end
      last_valid = cycle;
    end
  end
endmodule
