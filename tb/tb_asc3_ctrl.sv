// tb_asc3_ctrl: self-checking test of the ASC_3 controller.
// The reference is the eight-row primitive flow table of the controller
// (rows 1..8, columns x4x5 = 00, 10, 11, 01, Moore output y3), written here
// independently of the reduced four-state machine in the design. The stimulus
// walks the table at random, choosing only input columns that the table
// specifies for the current row (including both inputs changing at once).
// Every clock y3 must equal the row's output and the state code q3q2q1 must
// be the code of the merged state that holds the row
// (A={1,5}=000, B={2,6,8}=001, C={3}=100, D={4,7}=101).
module tb_asc3_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, x4 = 1'b0, x5 = 1'b0, y3;
  logic [2:0] q;
  int checks = 0, failures = 0, diag = 0;
  int visits [8];

  asc3_ctrl dut (.clk, .rst_n, .x4, .x5, .y3, .q);

  // next row per column index 0:00 1:10 2:11 3:01, 0 = unspecified
  int pft [8][4] = '{'{1, 0, 0, 2}, '{3, 0, 0, 2}, '{3, 5, 6, 4}, '{7, 8, 6, 4},
                     '{1, 5, 6, 2}, '{3, 8, 6, 2}, '{7, 8, 0, 0}, '{3, 8, 0, 0}};
  logic pft_y [8] = '{1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0};
  logic [2:0] code [8] = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b000, 3'b001, 3'b101, 3'b001};
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
    int row, col, nrow;
    row = 1;   // initial marking: row 1, inputs 00
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 5000; step++) begin
      do col = $urandom_range(0, 3); while (pft[row-1][col] == 0);
      if (x4 != col_bits[col][1] && x5 != col_bits[col][0]) diag++;
      {x4, x5} = col_bits[col];
      nrow = pft[row-1][col];
      row = nrow;
      visits[row-1]++;
      @(negedge clk);
      checks += 2;
      if (y3 !== pft_y[row-1]) begin
        failures++; $display("step %0d row %0d: y3=%b expected %b", step, row, y3, pft_y[row-1]);
      end
      if (q !== code[row-1]) begin
        failures++; $display("step %0d row %0d: q=%b expected %b", step, row, q, code[row-1]);
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
