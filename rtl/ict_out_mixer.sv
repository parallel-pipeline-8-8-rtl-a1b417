// Output mixer of the 1-D J processor: puts the eight coefficients of a row
// back into natural order Y0, Y1, ..., Y7 at the full sample rate.
//
// The coefficients leave the arithmetic elements at different half-rate
// slots.  The mixer is a 9-word shift register moving one word towards the
// output every clock; each coefficient is loaded, in the clock where it is
// valid, into the word whose distance from the output makes it leave at its
// natural position:
//   phase 7: Y0 -> word 4, Y4 -> word 8, Y5 -> word 1
//   phase 3: Y1 -> word 1
//   phase 5: Y2 -> word 0, Y6 -> word 4, Y3 -> word 1
//   phase 1: Y7 -> word 1
// (Y5 and Y7 belong to the row before the one whose Y0/Y4 or Y1 share the
// clock.)  With x0 of a row entering the 1-D processor at phase 0 of clock
// T, Y0 leaves on `y_out` in clock T + 28 and Y7 in clock T + 35.
// The document only says that a mixer restores natural order at fs; the
// loading scheme is this design's own.
module ict_out_mixer #(
  parameter int OW = 16
) (
  input  logic          clk,
  input  logic [2:0]    phase,
  input  logic [OW-1:0] y_add,    // from AE3
  input  logic [OW-1:0] y_sub,    // from AE4
  input  logic [OW-1:0] y_odd,    // from AE9
  output logic [OW-1:0] y_out
);
  logic [OW-1:0] os [9];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 8; i++) os[i] <= os[i+1];
    os[8] <= '0;
    unique case (phase)
      3'd7: begin os[4] <= y_add; os[8] <= y_sub; os[1] <= y_odd; end
      3'd3: os[1] <= y_odd;
      3'd5: begin os[0] <= y_add; os[4] <= y_sub; os[1] <= y_odd; end
      3'd1: os[1] <= y_odd;
      default: ;
    endcase
  end

  assign y_out = os[0];
endmodule
