// tb_asc2_clock_gate: self-checking test of the ASC_2 clock-pulse gate.
// Drives x2 pulses of random length and changes x3 at random times, also
// during pulses. Reference: on each clock, y2 must equal the x2 level sampled
// at the previous clock edge AND the x3 level that was sampled together with
// the first high sample of that pulse.
module tb_asc2_clock_gate;
  logic clk = 1'b0, rst_n = 1'b0, x2 = 1'b0, x3 = 1'b0, y2;
  int checks = 0, failures = 0, passed = 0, blocked = 0;
  logic x2_s = 1'b0, gate = 1'b0;

  asc2_clock_gate dut (.clk, .rst_n, .x2, .x3, .y2);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      if ($urandom_range(0, 2) == 0) x2 = ~x2;
      if ($urandom_range(0, 1) == 0) x3 = ~x3;
      @(posedge clk);
      if (x2 && !x2_s) begin
        gate = x3;
        if (x3) passed++; else blocked++;
      end
      x2_s = x2;
      @(negedge clk);
      checks++;
      if (y2 !== (x2_s & gate)) begin
        failures++; $display("cycle %0d: y2=%b expected %b", cyc, y2, x2_s & gate);
      end
    end
    checks++;
    if (passed < 10 || blocked < 10) begin
      failures++; $display("coverage: %0d passed, %0d blocked pulses", passed, blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
