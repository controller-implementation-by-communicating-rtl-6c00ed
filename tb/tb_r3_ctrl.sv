// tb_r3_ctrl: self-checking test of the R3 circuit of the FIFO controller.
// The testbench plays the rest of the FIFO: A2 may make at most two edges
// more than R3, and AY follows R3 after a random delay. Reference: R3 makes
// its edge number j+1 on a clock exactly when, at that clock's sample, A2 has
// made at least j+1 edges and AY equals R3. Checked on every clock.
module tb_r3_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, a2 = 1'b0, ay = 1'b0, r3;
  int checks = 0, failures = 0;
  int e2 = 0, er = 0, wait_ay = 0, lead2 = 0;

  r3_ctrl dut (.clk, .rst_n, .a2, .ay, .r3);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic r_s, cond;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      if (e2 < er + 2 && $urandom_range(0, 2) == 0) begin a2 = ~a2; e2++; end
      if (ay != r3 && $urandom_range(0, 3) == 0) ay = ~ay;
      if (e2 == er + 2) lead2++;
      r_s = r3;
      cond = (e2 >= er + 1) && (ay == r_s);
      if ((e2 >= er + 1) && (ay != r_s)) wait_ay++;
      @(negedge clk);
      checks++;
      if (r3 !== (cond ? ~r_s : r_s)) begin
        failures++;
        $display("cycle %0d: R3=%b expected %b (A2 edges %0d, R3 edges %0d)",
                 cyc, r3, cond ? ~r_s : r_s, e2, er);
      end
      if (r3 != r_s) er++;
    end
    checks++;
    if (wait_ay == 0 || lead2 == 0 || er < 100) begin
      failures++;
      $display("coverage: waits on AY %0d, A2 two ahead %0d, R3 edges %0d", wait_ay, lead2, er);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
