// tb_fifo_datapath: self-checking test of the FIFO data path.
// The testbench acts as the controller: it moves random items through the
// two pipelines by toggling R1, R2 and R3 in a random but legal order (a stage
// moves only when the one before holds an item it has not passed on, and never
// overwrites an item the next stage has not taken), and selects the oldest
// item at the output with RY (1 for items that travel in VD, the even ones,
// 0 for RD). Each selected item must equal the item that entered with the
// same number. Items wait two clocks after each request edge.
module tb_fifo_datapath;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, ry = 1'b0;
  logic [2:0] r = '0;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  int e [3] = '{0, 0, 0};   // edges of R1, R2, R3
  int eo = 0;               // items read at the output
  logic [W-1:0] items [$];

  fifo_datapath #(.DATA_W(W)) dut (.clk, .rst_n, .din, .r, .ry, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mv;
    bit ok;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (eo < 500) begin
      mv = $urandom_range(0, 3);
      ok = 1'b0;
      case (mv)
        0: if (e[0] - e[1] < 2 && e[0] < 520) begin
             din = W'($urandom); items.push_back(din); r[0] = ~r[0]; e[0]++; ok = 1'b1;
           end
        1: if (e[1] < e[0] && e[1] - e[2] < 2) begin r[1] = ~r[1]; e[1]++; ok = 1'b1; end
        2: if (e[2] < e[1] && e[2] - eo < 2)   begin r[2] = ~r[2]; e[2]++; ok = 1'b1; end
        default: if (eo < e[2]) begin
             ry = (eo % 2 == 0);
             @(negedge clk);
             checks++;
             if (dout !== items[eo]) begin
               failures++; $display("item %0d: dout=%h expected %h", eo, dout, items[eo]);
             end
             eo++;
           end
      endcase
      if (ok) repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
