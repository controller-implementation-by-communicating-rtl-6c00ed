// r2_ctrl: the R2 circuit of the FIFO controller (middle pipeline stage).
//
// A rising edge of R2 moves an item from VD1 to VD2, a falling edge moves one
// from RD1 to RD2. An edge of R2 is made when three conditions hold:
//   * stage 1 holds a new item for this register: an A1 edge of the same
//     direction has occurred since the last R2 edge of that direction;
//   * the previous R2 edge is complete: A2 equals R2;
//   * the next stage has taken the item this edge overwrites: an A3 edge of
//     the same direction has occurred since the last R2 edge of that
//     direction.
// At reset no item is pending and both successor registers count as free.
//
// How it works: besides R2 itself the circuit keeps four flags, one per
// direction for the predecessor (A1) and the successor (A3). A flag is set by
// the matching input edge and cleared by the R2 edge that consumes it. Edges
// are found against the inputs sampled one clock earlier. The flags are the
// same bookkeeping that the flow table of the R1 circuit keeps in its rows.
// They are needed here because A1 can make two edges before R2 is allowed to
// answer the first one.
//
// Interface: a1, a2, a3 in; r2 out; clk; active-low synchronous reset rst_n.
// Timing: inputs sampled on every rising clk edge; R2 changes one clock after
// the last of its conditions is met.
// The inputs and the dependencies follow the overall specification of the
// controller. This circuit's internal form has no printed flow table in the
// source design, so the flag form is this design's own.
module r2_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic a1,
  input  logic a2,
  input  logic a3,
  output logic r2
);
  logic a1_q, a3_q;
  logic pend_up_q, pend_dn_q;   // new item in VD1 / RD1
  logic free_up_q, free_dn_q;   // VD3 / RD3 took the previous VD2 / RD2 item
  logic pend_up, pend_dn, free_up, free_dn;
  logic fire_up, fire_dn;

  always_comb begin
    pend_up = pend_up_q | (a1 & ~a1_q);
    pend_dn = pend_dn_q | (~a1 & a1_q);
    free_up = free_up_q | (a3 & ~a3_q);
    free_dn = free_dn_q | (~a3 & a3_q);
    fire_up = ~r2 & (a2 == r2) & pend_up & free_up;
    fire_dn =  r2 & (a2 == r2) & pend_dn & free_dn;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a1_q      <= 1'b0;
      a3_q      <= 1'b0;
      pend_up_q <= 1'b0;
      pend_dn_q <= 1'b0;
      free_up_q <= 1'b1;
      free_dn_q <= 1'b1;
      r2        <= 1'b0;
    end else begin
      a1_q      <= a1;
      a3_q      <= a3;
      pend_up_q <= pend_up & ~fire_up;
      free_up_q <= free_up & ~fire_up;
      pend_dn_q <= pend_dn & ~fire_dn;
      free_dn_q <= free_dn & ~fire_dn;
      if (fire_up)      r2 <= 1'b1;
      else if (fire_dn) r2 <= 1'b0;
    end
  end
endmodule
