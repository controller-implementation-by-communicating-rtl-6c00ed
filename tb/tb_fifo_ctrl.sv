// tb_fifo_ctrl: self-checking test of the FIFO controller on its own.
// The testbench supplies the completion signals through delay lines of
// different lengths (A1: 1, A2: 3, A3: 2, AY: 4 clocks), a sender that toggles
// RIN after a random wait once AIN has answered, and a receiver that answers
// ROUT with AOUT after a random wait. It counts the edges of every signal and
// checks on every clock the ordering rules of the controller's specification:
//   each request follows its predecessor: R1<=RIN, R2<=A1, R3<=A2, RY<=A3;
//   no register is overwritten before its successor took the item:
//   R1<=A2+2, R2<=A3+2, R3<=AY+1, RY<=AOUT+1; R2 waits for its own A2: R2<=A2+1.
// At the end every item sent must have left (ROUT edges = RIN edges).
module tb_fifo_ctrl;
  localparam int NITEMS = 600;
  logic clk = 1'b0, rst_n = 1'b0, rin = 1'b0, aout = 1'b0;
  logic ain, rout, ry, ay;
  logic [2:0] r, a;
  logic [3:0] l1 = '0, l2 = '0, l3 = '0, ly = '0;
  int checks = 0, failures = 0;
  int n_rin = 0, n_r1 = 0, n_r2 = 0, n_r3 = 0, n_ry = 0;
  int n_a1 = 0, n_a2 = 0, n_a3 = 0, n_ay = 0, n_aout = 0;
  logic [2:0] r_p = '0, a_p = '0;
  logic ry_p = 1'b0, ay_p = 1'b0;

  fifo_ctrl dut (.clk, .rst_n, .rin, .ain, .rout, .aout, .r, .a, .ry, .ay);

  // delay lines standing for the data path's delay elements
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l1 <= '0; l2 <= '0; l3 <= '0; ly <= '0;
    end else begin
      l1 <= {l1[2:0], r[0]};
      l2 <= {l2[2:0], r[1]};
      l3 <= {l3[2:0], r[2]};
      ly <= {ly[2:0], ry};
    end
  end
  assign a  = {l3[1], l2[2], l1[0]};
  assign ay = ly[3];

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%t: rule broken: %s", $time, what); end
  endtask

  // edge counters and rule checks, every clock
  always @(negedge clk) if (rst_n) begin
    n_r1 += int'(r[0] != r_p[0]); n_r2 += int'(r[1] != r_p[1]); n_r3 += int'(r[2] != r_p[2]);
    n_a1 += int'(a[0] != a_p[0]); n_a2 += int'(a[1] != a_p[1]); n_a3 += int'(a[2] != a_p[2]);
    n_ry += int'(ry != ry_p); n_ay += int'(ay != ay_p);
    r_p = r; a_p = a; ry_p = ry; ay_p = ay;
    chk(n_r1 <= n_rin, "R1 <= RIN");
    chk(n_r2 <= n_a1,  "R2 <= A1");
    chk(n_r3 <= n_a2,  "R3 <= A2");
    chk(n_ry <= n_a3,  "RY <= A3");
    chk(n_r1 <= n_a2 + 2, "R1 <= A2+2");
    chk(n_r2 <= n_a3 + 2, "R2 <= A3+2");
    chk(n_r2 <= n_a2 + 1, "R2 <= A2+1");
    chk(n_r3 <= n_ay + 1, "R3 <= AY+1");
    chk(n_ry <= n_aout + 1, "RY <= AOUT+1");
    chk(ain == a[0] && rout == ay, "AIN = A1 and ROUT = AY");
  end

  initial begin : sender
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NITEMS; i++) begin
      while (rin != ain) @(negedge clk);
      repeat ($urandom_range(0, 6)) @(negedge clk);
      rin = ~rin; n_rin++;
      @(negedge clk);
    end
  end

  initial begin : receiver
    @(posedge rst_n);
    while (n_aout < NITEMS) begin
      @(negedge clk);
      if (aout != rout) begin
        repeat ($urandom_range(0, 8)) @(negedge clk);
        aout = ~aout; n_aout++;
      end
    end
    repeat (5) @(negedge clk);
    chk(n_rin == NITEMS && n_ay == NITEMS, "every item sent has left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
