// ry_ctrl: the RY circuit of the FIFO controller (output multiplexer select).
//
// RY = 1 selects MUX input 1 (VD3), RY = 0 selects input 0 (RD3). RY rises when
// VD3 has been loaded (A3 = 1) and the receiver has acknowledged the previous
// item (AOUT = 0 again); it falls when RD3 has been loaded (A3 = 0) and the
// receiver has acknowledged the item of VD3 (AOUT = 1).
//
// How it works: a Muller C-element on A3 and the inverse of AOUT: RY changes
// only when both agree on the new value, and holds otherwise.
// A3 cannot run ahead of RY, because the last stage waits for AY before it
// moves again. AOUT cannot run ahead either: it answers ROUT, and ROUT is AY.
//
// Interface: a3, aout in; ry out; clk; active-low synchronous reset rst_n to 0.
// Timing: inputs sampled on every rising clk edge, RY changes one clock later.
// Inputs and dependencies follow the overall specification of the controller;
// the C-element form is this design's reading of it.
module ry_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic a3,
  input  logic aout,
  output logic ry
);
  always_ff @(posedge clk) begin
    if (!rst_n)              ry <= 1'b0;
    else if (a3 && !aout)    ry <= 1'b1;
    else if (!a3 && aout)    ry <= 1'b0;
  end
endmodule
