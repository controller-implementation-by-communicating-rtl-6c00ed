// tb_asc1_counter: self-checking test of the ASC_1 counter.
// Applies random pulses on x1 (each level held 1..4 clocks) and checks y1 on
// every clock against the count of leading edges applied so far:
// y1 = 1 exactly when (edges mod (N+M)) >= N. y1 must change on the clock that
// samples the deciding edge. Runs the default N=3, M=2 and a second instance
// with N=1, M=4.
module tb_asc1_counter;
  logic clk = 1'b0, rst_n = 1'b0, x1 = 1'b0;
  logic y_def, y_14;
  int checks = 0, failures = 0;
  int edges = 0, rises = 0, falls = 0;
  logic y_prev = 1'b0;

  asc1_counter                  dut_d  (.clk, .rst_n, .x1, .y1(y_def));
  asc1_counter #(.N(1), .M(4))  dut_14 (.clk, .rst_n, .x1, .y1(y_14));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expect_y(int k, int n, int m);
    return (k % (n + m)) >= n;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      for (int lvl = 0; lvl < 2; lvl++) begin
        x1 = (lvl == 0);
        if (x1) edges++;
        repeat ($urandom_range(1, 4)) begin
          @(negedge clk);
          checks += 2;
          if (y_def !== expect_y(edges, 3, 2)) begin
            failures++; $display("edge %0d: y1(N=3,M=2)=%b", edges, y_def);
          end
          if (y_14 !== expect_y(edges, 1, 4)) begin
            failures++; $display("edge %0d: y1(N=1,M=4)=%b", edges, y_14);
          end
          if (y_def && !y_prev) rises++;
          if (!y_def && y_prev) falls++;
          y_prev = y_def;
        end
      end
    end
    checks++;
    if (rises < 10 || falls < 10) begin
      failures++; $display("too few y1 edges: %0d up, %0d down", rises, falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
