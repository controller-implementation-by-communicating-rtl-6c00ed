// tb_petri_asc_top: end-to-end test of the whole design at its default
// parameters (DATA_W = 8, TAU = 2, N = 3, M = 2).
// All four circuits run at the same time, each with its own environment and
// its own reference:
//   FIFO   random items through the two-phase channels, with the receiver
//          stopped now and then so that the FIFO fills; order and data checked
//   ASC_1  random x1 pulses; y1 = ((leading edges) mod (N+M)) >= N each clock
//   ASC_2  random x2 pulses and x3 changes; y2 = x2 gated by x3 at x2's rise
//   ASC_3  random walk of the eight-row flow table; y3 and q3q2q1 checked
// Every mechanism is counted and must occur at least once: the FIFO full (a
// sender held back), the receiver holding an item back, items through both
// pipelines (VD and RD) and both MUX settings, y1 rising and falling, a pulse
// passed and a pulse blocked, all four ASC_3 states and both inputs changing
// in one clock.
module tb_petri_asc_top;
  localparam int W = 8;
  localparam int N = 3, M = 2;
  localparam int NITEMS = 1500;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rin = 1'b0, aout = 1'b0, ain, rout;
  logic [W-1:0] din = '0, dout;
  logic x1 = 1'b0, x2 = 1'b0, x3 = 1'b0, x4 = 1'b0, x5 = 1'b0;
  logic y1, y2, y3;
  logic [2:0] asc3_q;
  int checks = 0, failures = 0;
  logic [W-1:0] items [$];
  int sent = 0, got = 0;
  bit fifo_done = 1'b0, asc_done = 1'b0;
  // mechanism counters
  int c_full = 0, c_recv_hold = 0, c_vd = 0, c_rd = 0, c_y1_up = 0, c_y1_dn = 0;
  int c_pass = 0, c_block = 0, c_diag = 0;
  int c_state [4];

  petri_asc_top dut (
    .clk, .rst_n, .rin, .din, .ain, .rout, .dout, .aout,
    .x1, .y1, .x2, .x3, .y2, .x4, .x5, .y3, .asc3_q
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  // ---------------- FIFO sender ----------------
  initial begin : fifo_sender
    @(posedge rst_n);
    for (int i = 0; i < NITEMS; i++) begin
      int w;
      w = 0;
      while (rin != ain) begin @(negedge clk); w++; end
      if (w > 20) c_full++;
      repeat ($urandom_range(0, 5)) @(negedge clk);
      din = W'($urandom);
      items.push_back(din);
      rin = ~rin;
      sent++;
      @(negedge clk);
    end
  end

  // ---------------- FIFO receiver ----------------
  initial begin : fifo_receiver
    @(posedge rst_n);
    while (got < NITEMS) begin
      @(negedge clk);
      if (aout != rout) begin
        chk(dout === items[got], $sformatf("FIFO item %0d: dout=%h expected %h", got, dout, items[got]));
        if (got % 2 == 0) c_vd++; else c_rd++;
        got++;
        if ($urandom_range(0, 60) == 0) begin
          c_recv_hold++;
          repeat ($urandom_range(60, 120)) @(negedge clk);
        end else begin
          repeat ($urandom_range(0, 12)) @(negedge clk);
        end
        aout = ~aout;
      end
    end
    fifo_done = 1'b1;
  end

  // ---------------- ASC_1 ----------------
  initial begin : asc1_env
    int edges;
    logic yp;
    edges = 0; yp = 1'b0;
    @(posedge rst_n);
    for (int p = 0; p < 400; p++) begin
      for (int lvl = 0; lvl < 2; lvl++) begin
        x1 = (lvl == 0);
        if (x1) edges++;
        repeat ($urandom_range(1, 4)) begin
          @(negedge clk);
          chk(y1 === ((edges % (N + M)) >= N), $sformatf("ASC_1: y1=%b after %0d edges", y1, edges));
          if (y1 && !yp) c_y1_up++;
          if (!y1 && yp) c_y1_dn++;
          yp = y1;
        end
      end
    end
  end

  // ---------------- ASC_2 ----------------
  initial begin : asc2_env
    logic x2_s, gate;
    x2_s = 1'b0; gate = 1'b0;
    @(posedge rst_n);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      if ($urandom_range(0, 2) == 0) x2 = ~x2;
      if ($urandom_range(0, 1) == 0) x3 = ~x3;
      @(posedge clk);
      if (x2 && !x2_s) begin
        gate = x3;
        if (x3) c_pass++; else c_block++;
      end
      x2_s = x2;
      @(negedge clk);
      chk(y2 === (x2_s & gate), $sformatf("ASC_2: y2=%b expected %b", y2, x2_s & gate));
    end
  end

  // ---------------- ASC_3 ----------------
  int pft [8][4] = '{'{1, 0, 0, 2}, '{3, 0, 0, 2}, '{3, 5, 6, 4}, '{7, 8, 6, 4},
                     '{1, 5, 6, 2}, '{3, 8, 6, 2}, '{7, 8, 0, 0}, '{3, 8, 0, 0}};
  logic pft_y [8] = '{1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0};
  logic [2:0] code [8] = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b000, 3'b001, 3'b101, 3'b001};
  logic [1:0] col_bits [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  initial begin : asc3_env
    int row, col;
    row = 1;
    @(posedge rst_n);
    for (int step = 0; step < 4000; step++) begin
      do col = $urandom_range(0, 3); while (pft[row-1][col] == 0);
      if (x4 != col_bits[col][1] && x5 != col_bits[col][0]) c_diag++;
      {x4, x5} = col_bits[col];
      row = pft[row-1][col];
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        chk(y3 === pft_y[row-1] && asc3_q === code[row-1],
            $sformatf("ASC_3: row %0d y3=%b q=%b", row, y3, asc3_q));
      end
      case (asc3_q)
        3'b000: c_state[0]++;
        3'b001: c_state[1]++;
        3'b100: c_state[2]++;
        default: c_state[3]++;
      endcase
    end
    asc_done = 1'b1;
  end

  // ---------------- end ----------------
  initial begin
    wait (fifo_done && asc_done);
    repeat (10) @(negedge clk);
    $display("FIFO: %0d items, full %0d times, receiver held %0d times, VD %0d, RD %0d",
             got, c_full, c_recv_hold, c_vd, c_rd);
    $display("ASC_1: y1 up %0d, down %0d; ASC_2: passed %0d, blocked %0d", c_y1_up, c_y1_dn, c_pass, c_block);
    $display("ASC_3: states A %0d B %0d C %0d D %0d, double changes %0d",
             c_state[0], c_state[1], c_state[2], c_state[3], c_diag);
    chk(got == NITEMS && sent == NITEMS, "all FIFO items through");
    chk(c_full > 0, "FIFO never full");
    chk(c_recv_hold > 0, "receiver never held an item back");
    chk(c_vd > 0 && c_rd > 0, "one of the pipelines never used");
    chk(c_y1_up > 0 && c_y1_dn > 0, "y1 never rose or fell");
    chk(c_pass > 0 && c_block > 0, "no pulse passed or blocked");
    foreach (c_state[i]) chk(c_state[i] > 0, $sformatf("ASC_3 state %0d never visited", i));
    chk(c_diag > 0, "ASC_3 never saw both inputs change at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
