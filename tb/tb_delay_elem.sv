// tb_delay_elem: self-checking test of the matched delay element.
// Drives a random request and checks that the completion is the request
// exactly TAU clocks earlier, every clock; a history kept by the testbench is
// the reference. Runs at TAU = 3 and the default TAU in two instances.
module tb_delay_elem;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic ack3, ack_def;
  int checks = 0, failures = 0;
  logic [63:0] hist = '0;   // hist[k] = req sampled k+1 clock edges ago

  delay_elem #(.TAU(3)) dut3   (.clk, .rst_n, .req, .ack(ack3));
  delay_elem             dut_d (.clk, .rst_n, .req, .ack(ack_def));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      if (cyc > 4) begin
        checks += 2;
        if (ack3 !== hist[2]) begin
          failures++; $display("cycle %0d: TAU=3 ack=%b expected %b", cyc, ack3, hist[2]);
        end
        if (ack_def !== hist[1]) begin
          failures++; $display("cycle %0d: TAU=2 ack=%b expected %b", cyc, ack_def, hist[1]);
        end
      end
      req = $urandom_range(0, 2) == 0 ? ~req : req;
      @(posedge clk);
      hist = {hist[62:0], req};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
