// J4o processor: the odd half of the 1-D J transform (eq. (17)).
//
// The 4x4 kernel splits into two pairs of inputs, A = (a4, a7) and
// B = (a6, a5), and four "forms" of a pair (x, y):
//   F1 = 10x + 2y, F2 = 2x - 10y, F3 = 9x - 6y, F4 = 6x + 9y
// with Y1 = F1A + F4B, Y3 = F3A - F1B, Y5 = F4A + F2B, Y7 = F2A + F3B.
// Every form needs only power-of-two weights in two add/shift steps:
//   stage 1 (d / f data): s = x + y, t = x - y, u = x + 2y, v = 2x - y
//   stage 2 (e / g data): F1 = 8x + 2s, F2 = 2t - 8y, F3 = 8t + u, F4 = 8s - v
// AE5 (adder) and AE6 (subtractor) handle pair A, AE7 (adder) and AE8
// (subtractor) pair B, and AE9 combines the forms into Y1, Y3, Y5, Y7 in
// natural order.  All five elements do four operations per row of four
// half-rate slots, so none is ever idle.  SRA2 is a 5-word shift register
// of the a-stream advancing once per slot.
// Timing (slot class = phase[2:1], elements clocked when phase[0] = 1):
// `a_odd` carries a7, a6, a5, a4 in classes 0..3 as produced by
// `ict_input_proc`; `y_odd` then gives Y1 in class 1, Y3 in class 2, Y5 in
// class 3 and Y7 in class 0 of the slots that follow (see `ict_out_mixer`).
// The three computing stages, the five elements and their names follow
// the document; the particular power-of-two split above and the schedule
// are this design's own.
module ict_j4o_proc #(
  parameter int OW = 16
) (
  input  logic          clk,
  input  logic [2:0]    phase,
  input  logic [OW-1:0] a_odd,
  output logic [OW-1:0] y_odd
);
  logic          ce;
  logic [OW-1:0] sra2 [5];
  logic [OW-1:0] sa_q, ta_q, sb_q, tb_q;
  logic [OW-1:0] f1b_q, f2b_q, f2a_q, f3b_q, f4a_q;
  logic [OW-1:0] ae5_a, ae5_b, ae6_a, ae6_b, ae7_a, ae7_b, ae8_a, ae8_b, ae9_a, ae9_b;
  logic [OW-1:0] ae5_y, ae6_y, ae7_y, ae8_y;
  logic          ae9_sub;

  assign ce = phase[0];

  always_ff @(posedge clk) begin
    if (ce) begin
      sra2[0] <= a_odd;
      for (int i = 1; i < 5; i++) sra2[i] <= sra2[i-1];
      unique case (phase[2:1])
        2'd0: begin sb_q <= ae7_y; tb_q <= ae8_y; f4a_q <= ae6_y; end
        2'd1: begin sa_q <= ae5_y; ta_q <= ae6_y; end
        2'd2: begin f1b_q <= ae7_y; f2b_q <= ae8_y; end
        default: begin f2a_q <= ae6_y; f3b_q <= ae7_y; end
      endcase
    end
  end

  // Pair A (x = a4, y = a7) on AE5 / AE6.
  always_comb begin
    unique case (phase[2:1])
      2'd3: begin ae5_a = a_odd;          ae5_b = sra2[2];        // s = x + y
                  ae6_a = a_odd;          ae6_b = sra2[2];  end   // t = x - y
      2'd0: begin ae5_a = sra2[0];        ae5_b = sra2[3] << 1;   // u = x + 2y
                  ae6_a = sra2[0] << 1;   ae6_b = sra2[3];  end   // v = 2x - y
      2'd1: begin ae5_a = sra2[1] << 3;   ae5_b = ae5_y << 1;     // F1 = 8x + 2s
                  ae6_a = ae6_y << 1;     ae6_b = sra2[4] << 3; end // F2 = 2t - 8y
      default: begin ae5_a = ta_q << 3;   ae5_b = ae5_y;          // F3 = 8t + u
                  ae6_a = sa_q << 3;      ae6_b = ae6_y;    end   // F4 = 8s - v
    endcase
  end

  // Pair B (x = a6, y = a5) on AE7 / AE8.
  always_comb begin
    unique case (phase[2:1])
      2'd2: begin ae7_a = sra2[0];        ae7_b = a_odd;          // s
                  ae8_a = sra2[0];        ae8_b = a_odd;    end   // t
      2'd3: begin ae7_a = sra2[1];        ae7_b = sra2[0] << 1;   // u
                  ae8_a = sra2[1] << 1;   ae8_b = sra2[0];  end   // v
      2'd0: begin ae7_a = sra2[2] << 3;   ae7_b = ae7_y << 1;     // F1
                  ae8_a = ae8_y << 1;     ae8_b = sra2[1] << 3; end // F2
      default: begin ae7_a = tb_q << 3;   ae7_b = ae7_y;          // F3
                  ae8_a = sb_q << 3;      ae8_b = ae8_y;    end   // F4
    endcase
  end

  // Output adder AE9.
  always_comb begin
    ae9_sub = 1'b0;
    unique case (phase[2:1])
      2'd3: begin ae9_a = ae5_y; ae9_b = ae8_y; end                  // Y1 = F1A + F4B
      2'd0: begin ae9_a = ae5_y; ae9_b = f1b_q; ae9_sub = 1'b1; end  // Y3 = F3A - F1B
      2'd1: begin ae9_a = f4a_q; ae9_b = f2b_q; end                  // Y5 = F4A + F2B
      default: begin ae9_a = f2a_q; ae9_b = f3b_q; end               // Y7 = F2A + F3B
    endcase
  end

  ict_ae #(.W(OW)) u_ae5 (.clk, .ce, .sub(1'b0), .a(ae5_a), .b(ae5_b), .y(ae5_y));
  ict_ae #(.W(OW)) u_ae6 (.clk, .ce, .sub(1'b1), .a(ae6_a), .b(ae6_b), .y(ae6_y));
  ict_ae #(.W(OW)) u_ae7 (.clk, .ce, .sub(1'b0), .a(ae7_a), .b(ae7_b), .y(ae7_y));
  ict_ae #(.W(OW)) u_ae8 (.clk, .ce, .sub(1'b1), .a(ae8_a), .b(ae8_b), .y(ae8_y));
  ict_ae #(.W(OW)) u_ae9 (.clk, .ce, .sub(ae9_sub), .a(ae9_a), .b(ae9_b), .y(y_odd));
endmodule
