// asc3_ctrl: the controller ASC_3 of the first design example.
//
// A data path reports two signals, x4 and x5, and the controller answers with
// y3. y3 falls once x4 has risen; it rises again once x4 has fallen and x5 has
// made a full pulse (up, then down). x4 and x5 may change concurrently.
//
// How it works: the reduced automaton of four states with Moore output y3.
// Inputs are written x4 x5:
//   A (y3=0): -0 -> A,  -1 -> B
//   B (y3=0): 00 -> C,  10/11/01 -> B
//   C (y3=1): 00 -> C,  10 -> A,  11 -> B,  01 -> D
//   D (y3=1): 0- -> D,  1- -> B
// This table is the primitive flow table of the design with its eight rows
// merged as A={1,5}, B={2,6,8}, C={3}, D={4,7}. The state codes q3q2q1 are
// A=000, B=001, C=100, D=101, so y3 is the state bit q3.
//
// Interface: x4, x5 in; y3 and the state vector q (q3q2q1) out; clk and an
// active-low synchronous reset rst_n into A, the state of the initial marking.
// Timing: inputs are sampled on each rising clk edge and y3 changes on the
// edge that samples the deciding input change. Inputs must hold each level for
// at least one clock. Two inputs changing in the same clock are handled by the
// diagonal entries of the table.
// The automaton, its codes and its initial state follow the source design.
// The clocked realisation is this design's choice. It therefore needs none of
// the extra codes that an unclocked realisation uses against races.
module asc3_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x4,
  input  logic       x5,
  output logic       y3,
  output logic [2:0] q
);
  typedef enum logic [2:0] {
    ST_A = 3'b000,
    ST_B = 3'b001,
    ST_C = 3'b100,
    ST_D = 3'b101
  } asc3_state_e;

  asc3_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_A: state_d = x5 ? ST_B : ST_A;
      ST_B: state_d = (!x4 && !x5) ? ST_C : ST_B;
      ST_C: unique case ({x4, x5})
              2'b00: state_d = ST_C;
              2'b10: state_d = ST_A;
              2'b11: state_d = ST_B;
              2'b01: state_d = ST_D;
            endcase
      ST_D: state_d = x4 ? ST_B : ST_D;
      default: state_d = ST_A;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= ST_A;
    else        state_q <= state_d;
  end

  assign q  = state_q;
  assign y3 = state_q[2];
endmodule
