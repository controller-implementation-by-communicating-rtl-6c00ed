// delay_elem: matched delay that turns a request into its completion signal.
//
// The FIFO data path of the design produces each completion signal (A1, A2,
// A3 and AY) as a delayed copy of the matching request (R1, R2, R3 and RY).
// Here the delay is a shift register of TAU clocks: ack(t) = req(t - TAU).
// Every edge of req reappears on ack, in order and unchanged in width, so
// the element behaves as a transport delay.
//
// Interface: req in, ack out, clk, active-low synchronous reset (rst_n) that
// clears the line to 0, matching the reset level of every request.
// Timing: ack follows req after exactly TAU rising clock edges.
// TAU has no value in the source design; 2 clocks is this design's choice.
// It must be at least 1 so that a register loaded on a request edge is
// stable before its completion signal changes.
module delay_elem #(
  parameter int unsigned TAU = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  output logic ack
);
  if (TAU < 1) begin : g_bad_tau
    $error("delay_elem: TAU must be at least 1");
  end

  logic [TAU-1:0] line_q;

  always_ff @(posedge clk) begin
    if (!rst_n) line_q <= '0;
    else        line_q <= (line_q << 1) | TAU'(req);
  end

  assign ack = line_q[TAU-1];
endmodule
