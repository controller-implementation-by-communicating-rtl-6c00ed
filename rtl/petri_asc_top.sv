// petri_asc_top: the four controllers of the design, side by side.
//
// The design shows one method: a controller is specified by the signal
// transition dialog with its environment and is realised as a flow-table
// machine. It applies the method to four circuits that do not work together:
//   * fifo             the two-pipeline FIFO with its controller (main design),
//                      STAGES registers per pipeline
//   * asc1_counter     ASC_1, y1 up after N leading edges of x1, down after M more
//   * asc2_clock_gate  ASC_2, passes a pulse of x2 when x3 = 1 at its start
//   * asc3_ctrl        ASC_3, the controller of the first design example
// Each keeps its own ports. ASC_3's data path is not part of the design, so
// its signals x4, x5 and y3 are ports of the top.
//
// Interface: clk and the active-low synchronous reset rst_n are shared; the
// other ports are those of the four circuits, named as in each of them
// (asc3_q is ASC_3's state vector q3q2q1).
// Timing: see each circuit; all are clocked realisations that sample their
// inputs on the rising edge of clk (this design's choice).
module petri_asc_top #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned TAU    = 2,
  parameter int unsigned STAGES = 3,
  parameter int unsigned N_CNT  = 3,
  parameter int unsigned M_CNT  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // FIFO
  input  logic              rin,
  input  logic [DATA_W-1:0] din,
  output logic              ain,
  output logic              rout,
  output logic [DATA_W-1:0] dout,
  input  logic              aout,
  // ASC_1
  input  logic              x1,
  output logic              y1,
  // ASC_2
  input  logic              x2,
  input  logic              x3,
  output logic              y2,
  // ASC_3
  input  logic              x4,
  input  logic              x5,
  output logic              y3,
  output logic [2:0]        asc3_q
);
  fifo #(.DATA_W(DATA_W), .TAU(TAU), .STAGES(STAGES)) u_fifo (
    .clk, .rst_n, .rin, .din, .ain, .rout, .dout, .aout
  );

  asc1_counter #(.N(N_CNT), .M(M_CNT)) u_asc1 (.clk, .rst_n, .x1, .y1);

  asc2_clock_gate u_asc2 (.clk, .rst_n, .x2, .x3, .y2);

  asc3_ctrl u_asc3 (.clk, .rst_n, .x4, .x5, .y3, .q(asc3_q));
endmodule
