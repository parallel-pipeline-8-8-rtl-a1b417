// 1-D J(10,9,6,2,3,1) processor: the integer, un-normalised 8-point
// transform Y = J x of one row (or column) at a time.
//
// Samples enter serially in natural order, one per clock, and the eight
// coefficients leave serially in natural order, one per clock, so rows can
// follow each other without gaps.  Inside, an input processor (butterflies),
// an even processor J4e and an odd processor J4o work in parallel at half
// the sample rate, and an output mixer restores the natural order.  The
// half-rate clock of the document is realised as a clock enable (the
// second clock of each two-clock slot) derived from a 3-bit sample counter.
// Interface: `in_sync` marks x0 of a row (it resets the sample counter;
// pulsing it once is enough for back-to-back rows); `in_valid` is carried
// along.  Timing: a row whose x0 enters in clock T gives Y0 in clock
// T + LATENCY (28) with `out_sync` high, then Y1..Y7.  Throughput is one
// sample per clock.  OW must be at least IW + 6 (kernel row gain <= 54).
// Structure follows the document; the slot schedule, the latency and the
// sync/valid handshake are this design's own.
module ict_j1d #(
  parameter int IW = 10,
  parameter int OW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_sync,
  input  logic          in_valid,
  input  logic [IW-1:0] x_in,
  output logic          out_sync,
  output logic          out_valid,
  output logic [OW-1:0] y_out
);
  localparam int LATENCY = 28;

  logic [2:0]    ph_q, phase;
  logic [OW-1:0] a_even, a_odd, y_add, y_sub, y_odd;

  assign phase = in_sync ? 3'd0 : ph_q;
  always_ff @(posedge clk) begin
    if (rst) ph_q <= 3'd0;
    else     ph_q <= phase + 3'd1;
  end

  ict_input_proc #(.IW(IW), .OW(OW)) u_in  (.clk, .phase, .x_in, .a_even, .a_odd);
  ict_j4e_proc   #(.OW(OW))          u_j4e (.clk, .phase, .a_even, .y_add, .y_sub);
  ict_j4o_proc   #(.OW(OW))          u_j4o (.clk, .phase, .a_odd, .y_odd);
  ict_out_mixer  #(.OW(OW))          u_mix (.clk, .phase, .y_add, .y_sub, .y_odd, .y_out);

  ict_delay #(.W(2), .N(LATENCY)) u_dly (.clk, .rst, .d({in_sync, in_valid}), .q({out_sync, out_valid}));

  initial assert (OW >= IW + 6) else $error("ict_j1d: OW must be at least IW + 6");
endmodule
