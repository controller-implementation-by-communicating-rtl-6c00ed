// fifo_datapath: data path of the two-pipeline FIFO.
//
// Items enter alternately into two pipelines of STAGES D registers each
// (three in the source design): VD1 -> VD2 -> VD3 and RD1 -> RD2 -> RD3.
// Register VDi loads on a rising edge of its request Ri, register RDi on a
// falling edge: VD1/RD1 from the input data, VDi/RDi from VD(i-1)/RD(i-1).
// The multiplexer puts the last VD register on the output when RY = 1 (MUX
// input 1) and the last RD register when RY = 0 (MUX input 0). Since the items
// alternate between the pipelines, switching RY on each output item restores
// the input order.
//
// How it works: an edge of Ri is detected against Ri sampled one clock
// earlier, and the register loads on the clock edge after Ri changed. The
// completion signals are produced outside (delay elements), at least one
// clock after Ri, so a register is stable before its completion appears.
//
// Interface: din (DATA_W bits) in; r[STAGES-1:0] (bit i is R(i+1)) and ry
// in; dout out; clk; active-low synchronous reset rst_n clears all registers
// to 0.
// Timing: a register loads one clock after its request edge; dout follows ry
// without a clock.
// Register structure, edges and MUX follow the source design, and so does
// making the pipeline length adjustable. The width and the clocked edge
// detection are this design's choices.
module fifo_datapath #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned STAGES = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,
  input  logic [STAGES-1:0] r,
  input  logic              ry,
  output logic [DATA_W-1:0] dout
);
  logic [STAGES-1:0]             r_q;
  logic [STAGES-1:0][DATA_W-1:0] vd_q, rd_q;   // VD1.., RD1..
  logic [STAGES-1:0][DATA_W-1:0] vd_src, rd_src;

  always_comb begin
    vd_src[0] = din;
    rd_src[0] = din;
    for (int i = 1; i < STAGES; i++) begin
      vd_src[i] = vd_q[i-1];
      rd_src[i] = rd_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_q  <= '0;
      vd_q <= '0;
      rd_q <= '0;
    end else begin
      r_q <= r;
      for (int i = 0; i < STAGES; i++) begin
        if ( r[i] && !r_q[i]) vd_q[i] <= vd_src[i];
        if (!r[i] &&  r_q[i]) rd_q[i] <= rd_src[i];
      end
    end
  end

  assign dout = ry ? vd_q[STAGES-1] : rd_q[STAGES-1];
endmodule
