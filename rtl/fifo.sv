// fifo: first-in-first-out memory with a two-phase bundled-data interface and
// an asynchronous-style controller made of communicating circuits.
//
// A sender puts an item on din and toggles rin; the FIFO answers by toggling
// ain once the item is stored, after which din may change. On the output the
// FIFO puts an item on dout and toggles rout; the receiver toggles aout once
// it has taken the item. Each edge of a request, rising or falling, is one
// item. Items alternate between two register pipelines of STAGES registers
// each (VD on rising, RD on falling request edges), so up to 2*STAGES items
// are held (six in the source design's three-stage configuration). A
// multiplexer at the end restores their order.
//
// Structure: fifo_ctrl (R1, R2, R3, RY circuits) drives fifo_datapath;
// delay elements (delay_elem, TAU clocks each) turn R1, R2, R3 and RY into
// the completion signals A1, A2, A3 and AY.
//
// Interface: clk, active-low synchronous reset rst_n (all signals 0, FIFO
// empty); rin, din, ain on the input side; rout, dout, aout on the output side.
// The sender may toggle rin only while rin equals ain, and the receiver may
// toggle aout only while aout differs from rout; the assertions below check
// this.
// Timing: ain answers TAU clocks after the clock edge that samples an rin edge.
// An item entering an empty FIFO toggles rout (STAGES+1)*(TAU+1) - 1 clocks
// after that edge (11 at STAGES = 3, TAU = 2): one clock per circuit (R1..,
// RY) plus one delay element each. With a receiver that answers at once, items leave every
// 2*TAU + 2 clocks, the loop R3 -> A3 -> RY -> AY -> R3 of the last stage.
// Structure, signal names and the adjustable pipeline length follow the
// source design; the clocked realisation, DATA_W and TAU are this design's
// choices.
module fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned TAU    = 2,
  parameter int unsigned STAGES = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rin,
  input  logic [DATA_W-1:0] din,
  output logic              ain,
  output logic              rout,
  output logic [DATA_W-1:0] dout,
  input  logic              aout
);
  logic [STAGES-1:0] r, a;
  logic       ry, ay;

  fifo_ctrl #(.STAGES(STAGES)) u_ctrl (
    .clk, .rst_n, .rin, .ain, .rout, .aout, .r, .a, .ry, .ay
  );

  fifo_datapath #(.DATA_W(DATA_W), .STAGES(STAGES)) u_dp (
    .clk, .rst_n, .din, .r, .ry, .dout
  );

  for (genvar i = 0; i < STAGES; i++) begin : g_delay
    delay_elem #(.TAU(TAU)) u_tau (.clk, .rst_n, .req(r[i]), .ack(a[i]));
  end
  delay_elem #(.TAU(TAU)) u_tau_y (.clk, .rst_n, .req(ry), .ack(ay));

  // Two-phase protocol of the environment. A toggle seen at a clock edge
  // happened after the previous edge, so it is compared with the answer that
  // was valid in between (the value sampled at this edge).
  a_rin_protocol: assert property (@(posedge clk) disable iff (!rst_n)
    (rin != $past(rin)) |-> ($past(rin) == ain))
    else $error("fifo: rin toggled before ain answered the previous item");
  a_aout_protocol: assert property (@(posedge clk) disable iff (!rst_n)
    (aout != $past(aout)) |-> ($past(aout) != rout))
    else $error("fifo: aout toggled with no output item pending");
endmodule
