// r1_ctrl: the R1 circuit of the FIFO controller.
//
// R1 loads the first register pair of the FIFO: a rising edge of R1 loads VD1,
// a falling edge loads RD1. R1 follows the input request RIN, one edge per
// data item. It may rise only when VD2 has taken the previous VD1 item, that
// is after a rising edge of A2. It may fall only when RD2 has taken the
// previous RD1 item, after a falling edge of A2. Only RIN and A2 are needed.
//
// How it works: the four-row reduced form of the primitive flow table of R1.
// The eight rows of that table are merged as P={1,5}, Q={3,6}, S={2,4},
// T={7,8}. Inputs are written RIN A2:
//   P (R1=0): 00 -> P, 10 -> S, 11 -> T, 01 -> P
//   Q (R1=0): 00 -> Q, 10 -> Q, 11 -> T, 01 -> P
//   S (R1=1): 00 -> Q, 10 -> S, 11 -> S, 01 -> P
//   T (R1=1): 00 -> Q, 10 -> S, 11 -> T, 01 -> T
// P: R1 low and free to rise. Q: R1 low, waiting for A2 to rise.
// S: R1 high and free to fall. T: R1 high, waiting for A2 to fall.
// The state code is {R1, waiting}, so R1 is a state bit (Moore output).
//
// Interface: rin, a2 in; r1 out; clk; active-low synchronous reset rst_n into
// P, the state of the initial marking (RIN=A2=R1=0).
// Timing: inputs sampled on every rising clk edge; R1 answers RIN one clock
// later when allowed. RIN and A2 may change in the same clock (diagonal
// entries of the table).
// The flow table is the source design's; its row merging, state code and
// clocked realisation are this design's choice.
module r1_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic rin,
  input  logic a2,
  output logic r1
);
  typedef enum logic [1:0] {
    ST_P = 2'b00,
    ST_Q = 2'b01,
    ST_S = 2'b10,
    ST_T = 2'b11
  } r1_state_e;

  r1_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_P: unique case ({rin, a2})
              2'b00, 2'b01: state_d = ST_P;
              2'b10:        state_d = ST_S;
              2'b11:        state_d = ST_T;
            endcase
      ST_Q: unique case ({rin, a2})
              2'b00, 2'b10: state_d = ST_Q;
              2'b11:        state_d = ST_T;
              2'b01:        state_d = ST_P;
            endcase
      ST_S: unique case ({rin, a2})
              2'b00:        state_d = ST_Q;
              2'b10, 2'b11: state_d = ST_S;
              2'b01:        state_d = ST_P;
            endcase
      ST_T: unique case ({rin, a2})
              2'b00:        state_d = ST_Q;
              2'b10:        state_d = ST_S;
              2'b11, 2'b01: state_d = ST_T;
            endcase
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= ST_P;
    else        state_q <= state_d;
  end

  assign r1 = state_q[1];
endmodule
