// J4e processor: the even half of the 1-D J transform (eqs. (16), (18),
// (19)).  From a0..a3 it forms
//   b0 = a0 + a3, b1 = a1 + a2, b3 = a0 - a3, b2 = a1 - a2
//   Y0 = b0 + b1, Y4 = b0 - b1, Y2 = 3*b3 + b2, Y6 = b3 - 3*b2.
// AE3 only adds and AE4 only subtracts; each does four operations in the
// four half-rate slots of a row, so both are busy every slot.  A third
// element forms 3*b as b + 2b.  SRA1 is a 4-word shift register, advancing
// once per slot, that holds a3..a0 as they arrive; b and 3b values that are
// needed later are kept in holding registers.
// Timing (slot class = phase[2:1], elements clocked when phase[0] = 1):
// the a-stream of `ict_input_proc` is expected on `a_even` (a3 in class 0,
// a2 in 1, a1 in 2, a0 in 3).  Y0 and Y4 then appear on `y_add` / `y_sub`
// in class 3 of the following row, Y2 and Y6 three slots later in class 2.
// Unit counts and the add/subtract split follow the document; the slot
// schedule is this design's own, and so is leaving the even outputs
// unordered here: the 1-D processor's single output mixer orders all eight.
module ict_j4e_proc #(
  parameter int OW = 16
) (
  input  logic          clk,
  input  logic [2:0]    phase,
  input  logic [OW-1:0] a_even,
  output logic [OW-1:0] y_add,    // AE3: Y0 (class 3), Y2 (class 2)
  output logic [OW-1:0] y_sub     // AE4: Y4 (class 3), Y6 (class 2)
);
  logic          ce;
  logic [OW-1:0] sra1 [4];
  logic [OW-1:0] b1_q, b2_q, b3_q, t3b2_q, t3b3_q;
  logic [OW-1:0] ae3_a, ae3_b, ae4_a, ae4_b, x3_y;

  assign ce = phase[0];

  always_ff @(posedge clk) begin
    if (ce) begin
      sra1[0] <= a_even;
      for (int i = 1; i < 4; i++) sra1[i] <= sra1[i-1];
      unique case (phase[2:1])
        2'd0: begin b1_q <= y_add; b2_q <= y_sub; end
        2'd1: b3_q <= y_sub;
        2'd2: t3b2_q <= x3_y;
        default: t3b3_q <= x3_y;
      endcase
    end
  end

  always_comb begin
    unique case (phase[2:1])
      2'd2: begin ae3_a = a_even; ae3_b = sra1[0]; ae4_a = a_even; ae4_b = sra1[0]; end // b1, b2
      2'd3: begin ae3_a = a_even; ae3_b = sra1[2]; ae4_a = a_even; ae4_b = sra1[2]; end // b0, b3
      2'd0: begin ae3_a = t3b3_q; ae3_b = b2_q;    ae4_a = b3_q;   ae4_b = t3b2_q;  end // Y2, Y6
      default: begin ae3_a = y_add; ae3_b = b1_q;  ae4_a = y_add;  ae4_b = b1_q;    end // Y0, Y4
    endcase
  end

  ict_ae #(.W(OW)) u_ae3 (.clk, .ce, .sub(1'b0), .a(ae3_a), .b(ae3_b), .y(y_add));
  ict_ae #(.W(OW)) u_ae4 (.clk, .ce, .sub(1'b1), .a(ae4_a), .b(ae4_b), .y(y_sub));
  // x3 unit: b2 in class 0, b3 in class 1, both straight from AE4.
  ict_ae #(.W(OW)) u_x3  (.clk, .ce, .sub(1'b0), .a(y_sub), .b(y_sub << 1), .y(x3_y));
endmodule
