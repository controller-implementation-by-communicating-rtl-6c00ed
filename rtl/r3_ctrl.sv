// r3_ctrl: the R3 circuit of the FIFO controller (last pipeline stage).
//
// A rising edge of R3 moves an item from VD2 to VD3, a falling edge from RD2
// to RD3. The last stage works strictly in sequence: R3, then A3, then the
// MUX select RY, then its completion AY. So R3 makes its next edge only when
// AY equals R3. That is, the previous item has been switched to the output,
// and (through RY) the item before it has been acknowledged. Its other
// condition is a new item in stage 2: an A2 edge of the same direction since
// the last R3 edge of that direction.
//
// How it works: two flags record a pending rising and falling A2 edge; each is
// set by the matching A2 edge (found against A2 sampled one clock earlier) and
// cleared by the R3 edge that consumes it. If A2 could not run ahead, this
// reduces to a Muller C-element on A2 and the inverse of AY.
//
// Interface: a2, ay in; r3 out; clk; active-low synchronous reset rst_n
// (no item pending, R3 = 0).
// Timing: inputs sampled on every rising clk edge; R3 changes one clock after
// both conditions hold.
// The inputs and dependencies follow the overall specification of the
// controller. The flag form is this design's own, since no flow table of this
// circuit is printed in the source design.
module r3_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic a2,
  input  logic ay,
  output logic r3
);
  logic a2_q;
  logic pend_up_q, pend_dn_q;
  logic pend_up, pend_dn, fire_up, fire_dn;

  always_comb begin
    pend_up = pend_up_q | (a2 & ~a2_q);
    pend_dn = pend_dn_q | (~a2 & a2_q);
    fire_up = ~r3 & (ay == r3) & pend_up;
    fire_dn =  r3 & (ay == r3) & pend_dn;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a2_q      <= 1'b0;
      pend_up_q <= 1'b0;
      pend_dn_q <= 1'b0;
      r3        <= 1'b0;
    end else begin
      a2_q      <= a2;
      pend_up_q <= pend_up & ~fire_up;
      pend_dn_q <= pend_dn & ~fire_dn;
      if (fire_up)      r3 <= 1'b1;
      else if (fire_dn) r3 <= 1'b0;
    end
  end
endmodule
