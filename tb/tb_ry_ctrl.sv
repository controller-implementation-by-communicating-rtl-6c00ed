// tb_ry_ctrl: self-checking test of the RY circuit of the FIFO controller.
// The testbench plays the last stage and the receiver: A3 may lead RY by one
// edge, and AOUT answers each RY edge after a random delay. Reference: RY
// changes on a clock exactly when, at that clock's sample, A3 differs from RY
// and AOUT equals RY. Checked on every clock; waits on each input are counted.
module tb_ry_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, a3 = 1'b0, aout = 1'b0, ry;
  int checks = 0, failures = 0, er = 0, wait_aout = 0, wait_a3 = 0;

  ry_ctrl dut (.clk, .rst_n, .a3, .aout, .ry);

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
      if (a3 == ry && $urandom_range(0, 2) == 0) a3 = ~a3;
      if (aout != ry && $urandom_range(0, 3) == 0) aout = ~aout;
      r_s = ry;
      cond = (a3 != r_s) && (aout == r_s);
      if (a3 != r_s && aout != r_s) wait_aout++;
      if (a3 == r_s) wait_a3++;
      @(negedge clk);
      checks++;
      if (ry !== (cond ? ~r_s : r_s)) begin
        failures++; $display("cycle %0d: RY=%b expected %b", cyc, ry, cond ? ~r_s : r_s);
      end
      if (ry != r_s) er++;
    end
    checks++;
    if (wait_aout == 0 || wait_a3 == 0 || er < 100) begin
      failures++; $display("coverage: waits on AOUT %0d, on A3 %0d, RY edges %0d", wait_aout, wait_a3, er);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
