// fifo_check: test environment for one FIFO configuration (used by tb_fifo).
// A sender writes random items over the two-phase input channel and a
// receiver reads them over the output channel; every item read must equal
// the item written with the same number. The test runs in four phases:
//   1. one item into the empty FIFO: AIN must answer TAU clocks after the
//      clock that samples the RIN edge, and ROUT must toggle
//      (STAGES+1)*(TAU+1) - 1 clocks after it (one clock per circuit, one
//      delay element each);
//   2. a burst with the receiver stopped: the FIFO must take exactly
//      2*STAGES items (the VD and RD registers) and then hold AIN back;
//   3. both sides at full speed: at steady state an item leaves every
//      2*TAU+2 clocks (the last stage's loop R3, A3, RY, AY);
//   4. random waits on both sides.
// When finished it raises done and reports its counts on the ports.
module fifo_check #(
  parameter int TAU    = 2,
  parameter int STAGES = 3,
  parameter int NRAND  = 400
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, rin = 1'b0, aout = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic ain, rout;
  int sent = 0, got = 0, cyc = 0;
  logic [W-1:0] items [$];
  bit recv_on = 1'b0;
  int recv_wait_max = 0;
  int last_out = -1, period = -1;

  fifo #(.DATA_W(W), .TAU(TAU), .STAGES(STAGES)) dut (
    .clk, .rst_n, .rin, .din, .ain, .rout, .dout, .aout
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;


  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, what); end
  endtask

  task automatic send_one();
    while (rin != ain) @(negedge clk);
    din = W'($urandom);
    items.push_back(din);
    rin = ~rin;
    sent++;
  endtask

  // receiver: checks data, answers after a random wait when enabled
  initial begin : receiver
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (recv_on && aout != rout) begin
        chk(dout === items[got], $sformatf("item %0d: dout=%h expected %h", got, dout, items[got]));
        period = (last_out >= 0) ? cyc - last_out : -1;
        last_out = cyc;
        got++;
        repeat ($urandom_range(0, recv_wait_max)) @(negedge clk);
        aout = ~aout;
      end
    end
  end

  initial begin : sender
    int t0, t_ain, t_rout, stalls;
    done = 1'b0;
    checks = 0;
    failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // phase 1: latency through the empty FIFO
    recv_on = 1'b1;
    send_one();
    t0 = cyc + 1;   // the next rising edge samples the RIN edge
    t_ain = -1; t_rout = -1;
    while (t_rout < 0) begin
      @(negedge clk);
      if (t_ain < 0 && ain == rin) t_ain = cyc;
      if (rout != aout) t_rout = cyc;
    end
    chk(t_ain - t0 == TAU, $sformatf("AIN latency %0d, expected %0d", t_ain - t0, TAU));
    chk(t_rout - t0 == (STAGES + 1) * (TAU + 1) - 1, $sformatf("ROUT latency %0d, expected %0d", t_rout - t0, (STAGES + 1) * (TAU + 1) - 1));
    while (got < 1) @(negedge clk);

    // phase 2: capacity with the receiver stopped
    recv_on = 1'b0;
    repeat (10) @(negedge clk);
    stalls = 0;
    for (int i = 0; i < 2 * STAGES + 2; i++) begin
      int w;
      w = 0;
      while (rin != ain && w < 200) begin @(negedge clk); w++; end
      if (w >= 200) begin stalls++; break; end
      send_one();
    end
    chk(sent - got == 2 * STAGES + 1 && stalls == 1 && rin != ain,
        $sformatf("capacity: %0d items accepted, expected %0d and one more held back", sent - got - int'(rin != ain), 2 * STAGES));
    recv_on = 1'b1;
    while (got < sent) @(negedge clk);

    // phase 3: full speed on both sides
    recv_wait_max = 0;
    for (int i = 0; i < 40; i++) send_one();
    while (got < sent) @(negedge clk);
    chk(period == 2 * TAU + 2, $sformatf("steady-state period %0d clocks, expected %0d", period, 2 * TAU + 2));

    // phase 4: random waits on both sides
    for (int i = 0; i < NRAND; i++) begin
      if (i % 100 == 0) recv_wait_max = $urandom_range(0, 20);
      repeat ($urandom_range(0, 8)) @(negedge clk);
      send_one();
    end
    while (got < sent) @(negedge clk);
    chk(got == sent, "all items received");
    $display("STAGES=%0d TAU=%0d: %0d items, %0d checks, %0d failures", STAGES, TAU, got, checks, failures);
    done = 1'b1;
  end
endmodule
