// fifo_ctrl: controller of the two-pipeline FIFO, built as an assemblage of
// small communicating sequential circuits.
//
// The controller's whole behaviour is one signal transition graph. Split
// totally, it gives one circuit per output signal. Each circuit sees only the
// global signals it needs, and they synchronise through those signals alone.
// For the three-stage FIFO of the source design:
//   R1 circuit (r1_ctrl): RIN, A2        -> R1
//   R2 circuit (r2_ctrl): A1, A2, A3     -> R2
//   R3 circuit (r3_ctrl): A2, AY         -> R3
//   RY circuit (ry_ctrl): A3, AOUT       -> RY
//   AIN is a copy of A1 ("input data stored") and ROUT a copy of AY (the
//   selected output register is on the MUX output). The specification
//   puts no further condition on either, so both are wires, and those two
//   outputs are driven straight from inputs.
// With STAGES stages, the first stage uses r1_ctrl and the last uses
// r3_ctrl. Every stage in between uses r2_ctrl with its neighbours'
// completions: Ri gets A(i-1), Ai and A(i+1).
//
// Interface: all handshakes are two-phase: every edge, rising or falling, of a
// request is one event and is answered by an edge of its acknowledge.
//   rin/ain   : input channel (RIN from the sender, AIN back)
//   rout/aout : output channel (ROUT to the receiver, AOUT back)
//   r         : R1.. to the data path (bit i is R(i+1)), a : A1.. back
//   ry, ay    : MUX select and its completion
// clk and the active-low synchronous reset rst_n go to every circuit.
// Timing: each circuit answers one clock after its conditions hold.
// The split into circuits and their inputs follow the source design. The
// clocked realisation of each circuit and the rule for stages beyond three
// are this design's choices.
module fifo_ctrl #(
  parameter int unsigned STAGES = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rin,
  output logic              ain,
  output logic              rout,
  input  logic              aout,
  output logic [STAGES-1:0] r,
  input  logic [STAGES-1:0] a,
  output logic              ry,
  input  logic              ay
);
  if (STAGES < 2) begin : g_bad_stages
    $error("fifo_ctrl: STAGES must be at least 2");
  end

  r1_ctrl u_r1 (.clk, .rst_n, .rin, .a2(a[1]), .r1(r[0]));

  for (genvar i = 1; i < STAGES - 1; i++) begin : g_mid
    r2_ctrl u_r2 (.clk, .rst_n, .a1(a[i-1]), .a2(a[i]), .a3(a[i+1]), .r2(r[i]));
  end

  r3_ctrl u_r3 (.clk, .rst_n, .a2(a[STAGES-2]), .ay, .r3(r[STAGES-1]));
  ry_ctrl u_ry (.clk, .rst_n, .a3(a[STAGES-1]), .aout, .ry);

  assign ain  = a[0];
  assign rout = ay;
endmodule
