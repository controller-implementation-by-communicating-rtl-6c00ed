// asc2_clock_gate: the elementary clock-pulse gate ASC_2.
//
// y2 copies a pulse of x2 when x3 is 1 at the moment x2 rises, and stays 0
// for the whole pulse otherwise. Changes of x3 while x2 is high (or low) have
// no effect, so x3 may change at any time relative to x2.
//
// How it works: a three-row Moore flow table.
//   IDLE  (x2 low,  y2=0): x2 up -> PASS if x3=1, BLOCK if x3=0
//   PASS  (x2 high, y2=1): x2 down -> IDLE
//   BLOCK (x2 high, y2=0): x2 down -> IDLE
// y2 is the PASS bit of the state register.
//
// Interface: x2, x3 in, y2 out, clk, active-low synchronous reset rst_n into
// IDLE. Timing: inputs sampled on each rising clk edge; y2 follows x2 one clock
// later. x2 must hold each level for at least one clock.
// The gating rule is the source design's; the flow table and the clocked
// realisation are this design's choice.
module asc2_clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic x2,
  input  logic x3,
  output logic y2
);
  typedef enum logic [1:0] {IDLE = 2'b00, PASS = 2'b01, BLOCK = 2'b10} gate_state_e;

  gate_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      IDLE:        if (x2)  state_d = x3 ? PASS : BLOCK;
      PASS, BLOCK: if (!x2) state_d = IDLE;
      default:              state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= IDLE;
    else        state_q <= state_d;
  end

  assign y2 = (state_q == PASS);
endmodule
