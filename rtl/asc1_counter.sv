// asc1_counter: the elementary counter circuit ASC_1.
//
// y1 rises after N leading edges of x1 and falls again after M further
// leading edges of x1; the cycle then repeats. Trailing edges of x1 are
// tracked but change nothing.
//
// How it works: the flow-table state is the pair (count of leading edges
// modulo N+M, last sampled level of x1). A leading edge is a sample of x1
// at 1 following a sample at 0. y1 is a Moore output: 1 while the count is
// N or more.
//
// Interface: x1 in, y1 out, clk, active-low synchronous reset rst_n. Reset
// puts the circuit in the STG's initial marking: x1 taken as low, count 0,
// y1 = 0.
// Timing: x1 is sampled on every rising clk edge and must hold each level for
// at least one clock (the timing convention that the source design requires
// for successive changes of one input). y1 changes on the clock edge that
// samples the N-th (resp. (N+M)-th) leading edge.
// The behaviour follows the source design; N and M have no values there
// (N=3, M=2 are this design's defaults), and the clocked realisation of the
// asynchronous circuit is this design's choice.
module asc1_counter #(
  parameter int unsigned N = 3,
  parameter int unsigned M = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x1,
  output logic y1
);
  localparam int unsigned PERIOD = N + M;
  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  if (N < 1 || M < 1) begin : g_bad_nm
    $error("asc1_counter: N and M must be at least 1");
  end

  logic [CW-1:0] cnt_q, cnt_d;
  logic          x1_q;

  always_comb begin
    cnt_d = cnt_q;
    if (x1 && !x1_q) begin
      cnt_d = (cnt_q == CW'(PERIOD - 1)) ? '0 : cnt_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
      x1_q  <= 1'b0;
      y1    <= 1'b0;
    end else begin
      cnt_q <= cnt_d;
      x1_q  <= x1;
      y1    <= (cnt_d >= CW'(N));
    end
  end
endmodule
