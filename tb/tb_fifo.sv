// tb_fifo: end-to-end self-checking test of the FIFO in three configurations.
// Each configuration runs in its own fifo_check environment (latency,
// capacity, steady-state rate and random traffic, see fifo_check):
//   STAGES = 3, TAU = 2  the default configuration (three registers per pipeline)
//   STAGES = 2, TAU = 1  the shortest pipelines
//   STAGES = 5, TAU = 3  longer pipelines, with four middle-stage circuits
module tb_fifo;
  bit d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;
  int checks, failures;
  logic clk = 1'b0;

  fifo_check                               e_def (.done(d0), .checks(c0), .failures(f0));
  fifo_check #(.STAGES(2), .TAU(1))         e_s2  (.done(d1), .checks(c1), .failures(f1));
  fifo_check #(.STAGES(5), .TAU(3))         e_s5  (.done(d2), .checks(c2), .failures(f2));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
