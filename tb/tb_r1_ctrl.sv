// tb_r1_ctrl: self-checking test of the R1 circuit of the FIFO controller.
// The reference is the eight-row primitive flow table of R1 (columns RIN A2 =
// 00, 10, 11, 01, Moore output R1), written here independently of the
// four-row machine in the design. The stimulus walks the table at random using
// only the input columns the table specifies for the current row, double
// changes included, and checks R1 on every clock.
module tb_r1_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, rin = 1'b0, a2 = 1'b0, r1;
  int checks = 0, failures = 0, diag = 0;
  int visits [8];

  r1_ctrl dut (.clk, .rst_n, .rin, .a2, .r1);

  int pft [8][4] = '{'{1, 2, 0, 0}, '{3, 2, 4, 5}, '{3, 6, 7, 5}, '{0, 0, 4, 5},
                     '{1, 2, 7, 5}, '{0, 6, 7, 0}, '{3, 2, 7, 8}, '{3, 0, 0, 8}};
  logic pft_y [8] = '{1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1};
  logic [1:0] col_bits [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int row, col;
    row = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 5000; step++) begin
      do col = $urandom_range(0, 3); while (pft[row-1][col] == 0);
      if (rin != col_bits[col][1] && a2 != col_bits[col][0]) diag++;
      {rin, a2} = col_bits[col];
      row = pft[row-1][col];
      visits[row-1]++;
      @(negedge clk);
      checks++;
      if (r1 !== pft_y[row-1]) begin
        failures++; $display("step %0d row %0d: R1=%b expected %b", step, row, r1, pft_y[row-1]);
      end
    end
    checks++;
    if (diag < 20) begin failures++; $display("only %0d double input changes", diag); end
    foreach (visits[i]) begin
      checks++;
      if (visits[i] == 0) begin failures++; $display("row %0d never reached", i + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
