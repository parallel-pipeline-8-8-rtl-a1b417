// Arithmetic element (AE): a two-stage pipelined adder/subtractor.
//
// Every arithmetic unit of the processor (AE1..AE9 and the x3 unit) is one
// of these.  Stage 1 adds the low halves of the operands and registers the
// carry together with the high halves; stage 2 adds the high halves and
// the carry.  Both registers advance only when `ce` is high, which is the
// half-rate (fs/2) enable, so an operation presented in one half-rate slot
// appears on `y` two slots later and a new one can start every slot.
// Subtraction (`sub` = 1) is a + ~b + 1.  The result wraps modulo 2^W; the
// caller sizes W so that no overflow occurs.
// The split at the middle follows the document's description of its adders
// (carry-lookahead with one register stage in the middle); the exact carry
// logic inside each half is left to synthesis.
module ict_ae #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         sub,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  localparam int L = W / 2;
  localparam int H = W - L;

  logic [W-1:0] bx;
  logic [L:0]   lo_sum;
  logic [L-1:0] lo_q;
  logic         c_q;
  logic [H-1:0] ah_q, bh_q;

  assign bx     = sub ? ~b : b;
  assign lo_sum = {1'b0, a[L-1:0]} + {1'b0, bx[L-1:0]} + {{L{1'b0}}, sub};

  always_ff @(posedge clk) begin
    if (ce) begin
      lo_q <= lo_sum[L-1:0];
      c_q  <= lo_sum[L];
      ah_q <= a[W-1:L];
      bh_q <= bx[W-1:L];
      y    <= {ah_q + bh_q + {{(H-1){1'b0}}, c_q}, lo_q};
    end
  end
endmodule
