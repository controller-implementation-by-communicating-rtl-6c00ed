// tb_r2_ctrl: self-checking test of the R2 circuit of the FIFO controller.
// The testbench plays the rest of the FIFO: A1 may make at most two edges
// more than R2 (stage 1 holds at most two items), A2 follows R2 after a random
// delay and A3 follows A2 after a random delay. The reference counts edges:
// R2 makes its edge number j+1 on a clock exactly when, at that clock's
// sample, A1 has made at least j+1 edges, A2 equals R2 and A3 has made at
// least j-1 edges. This is checked on every clock, and the waits on each
// condition are counted so that each one is seen to block R2.
module tb_r2_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, a1 = 1'b0, a2 = 1'b0, a3 = 1'b0, r2;
  int checks = 0, failures = 0;
  int e1 = 0, e2 = 0, e3 = 0, er = 0;
  int wait_a3 = 0, wait_a2 = 0, lead2 = 0;

  r2_ctrl dut (.clk, .rst_n, .a1, .a2, .a3, .r2);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic r_s, a2_s, cond;
    int e1_s, e3_s, er_s;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // drive the environment, within the limits the FIFO imposes
      if (e1 < er + 2 && $urandom_range(0, 2) == 0) begin a1 = ~a1; e1++; end
      if (a2 != r2 && $urandom_range(0, 1) == 0) begin a2 = ~a2; e2++; end
      if (e3 < e2 && $urandom_range(0, 5) == 0) begin a3 = ~a3; e3++; end
      if (e1 == er + 2) lead2++;
      r_s = r2; a2_s = a2; e1_s = e1; e3_s = e3; er_s = er;
      cond = (e1_s >= er_s + 1) && (a2_s == r_s) && (e3_s >= er_s - 1);
      if ((e1_s >= er_s + 1) && (a2_s == r_s) && !(e3_s >= er_s - 1)) wait_a3++;
      if ((e1_s >= er_s + 1) && (a2_s != r_s)) wait_a2++;
      @(negedge clk);
      checks++;
      if (r2 !== (cond ? ~r_s : r_s)) begin
        failures++;
        $display("cycle %0d: R2=%b expected %b (A1 edges %0d, R2 edges %0d, A3 edges %0d)",
                 cyc, r2, cond ? ~r_s : r_s, e1_s, er_s, e3_s);
      end
      if (r2 != r_s) er++;
    end
    checks++;
    if (wait_a3 == 0 || wait_a2 == 0 || lead2 == 0 || er < 100) begin
      failures++;
      $display("coverage: waits on A3 %0d, on A2 %0d, A1 two ahead %0d, R2 edges %0d",
               wait_a3, wait_a2, lead2, er);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
