// Input processor of the 1-D J(10,9,6,2,3,1) processor: first computing
// stage of the transform (the butterflies of eq. (8)).
//
// Samples x0..x7 of a row arrive in natural order, one per clock, with
// `phase` giving the index of the sample on `x_in`.  They enter an
// 11-word shift register.  Two arithmetic elements working at half rate
// (their enable is phase[0], i.e. the second clock of each two-clock slot)
// take one operand pair each per slot through 4:1 multiplexers:
//   AE1 (adder)      produces a3, a2, a1, a0   with a_n     = x_n + x_(7-n)
//   AE2 (subtractor) produces a7, a6, a5, a4   with a_(n+4) = x_n - x_(7-n)
// a3/a7 are taken as soon as x4 is in, a0/a4 once x7 is in; by then x0 sits
// at the far end of the 11-word register, which is why it has 11 words.
// Timing: with x0 of a row at phase 0, a3/a7 appear on the outputs during
// phases 0-1 of the next row, a2/a6 during 2-3, a1/a5 during 4-5 and a0/a4
// during 6-7.  Inputs are sign-extended to the internal width OW.
// The shift register length, the two half-rate elements and the order
// a3..a0 follow the document; the labelling of the differences
// (a4 = x0 - x7 ... a7 = x3 - x4) and the exact slot timing are this
// design's own.
module ict_input_proc #(
  parameter int IW = 10,
  parameter int OW = 16
) (
  input  logic          clk,
  input  logic [2:0]    phase,
  input  logic [IW-1:0] x_in,
  output logic [OW-1:0] a_even,   // AE1 output: a3, a2, a1, a0
  output logic [OW-1:0] a_odd     // AE2 output: a7, a6, a5, a4
);
  logic [OW-1:0] sr [11];
  logic [1:0]    j;
  logic [OW-1:0] op1, op2;

  always_ff @(posedge clk) begin
    sr[0] <= OW'(signed'(x_in));
    for (int i = 1; i < 11; i++) sr[i] <= sr[i-1];
  end

  // Slot class phase[2:1] = 2,3,0,1 selects pair (x3,x4),(x2,x5),(x1,x6),(x0,x7).
  assign j = phase[2:1] + 2'd2;
  always_comb begin
    unique case (j)
      2'd0: begin op1 = sr[1];  op2 = sr[0]; end
      2'd1: begin op1 = sr[4];  op2 = sr[1]; end
      2'd2: begin op1 = sr[7];  op2 = sr[2]; end
      default: begin op1 = sr[10]; op2 = sr[3]; end
    endcase
  end

  ict_ae #(.W(OW)) u_ae1 (.clk, .ce(phase[0]), .sub(1'b0), .a(op1), .b(op2), .y(a_even));
  ict_ae #(.W(OW)) u_ae2 (.clk, .ce(phase[0]), .sub(1'b1), .a(op1), .b(op2), .y(a_odd));
endmodule
