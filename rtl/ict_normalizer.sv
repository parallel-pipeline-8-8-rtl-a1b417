// Output normaliser: X(u,v) = round(K_H(u,v) * Y(u,v)) as a 12-bit two's
// complement number.
//
// K_H(u,v) is quantised to 18 fraction bits and applied as a 13-bit
// mantissa times a power of two (see ict_pkg), so the product is a
// 23 x 13 multiplication.  The multiplier is pipelined one partial product
// per stage (13 stages of shift-and-add), followed by a stage that applies
// the power of two and rounds to the nearest integer, halves away from
// zero (add one half, or one half minus one unit for a negative product,
// then shift right by 18), and a stage that saturates to the 12-bit range
// [-2048, 2047].  Rounding halves away from zero matters because two
// entries of K_H (1/8 and 1/40) make exact halves common.
// Interface: `in_sync` marks coefficient (0,0) of a block.  Coefficients
// are expected in the order the 2-D pipeline produces them: column by
// column, i.e. clock n of a block carries (u,v) = (n mod 8, n div 8);
// since K_H is symmetric the order of u and v does not matter.
// Timing: LATENCY = 16 clocks from `y_in` to `x_out`, one result per clock.
// The 18-bit/13-bit coefficient word length, the 23x13 multiplier, the
// rounding and the 12-bit output follow the document; the mantissa/shift
// coding, the stage split and the saturation are this design's own.
module ict_normalizer
  import ict_pkg::*;
#(
  parameter int YW = OUT_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_sync,
  input  logic [YW-1:0]     y_in,
  output logic [NORM_W-1:0] x_out
);
  localparam int PW = YW + COEF_W;      // product width
  localparam int SW = PW + 3;           // after the shift by up to 3
  localparam int NS = COEF_W;           // partial-product stages

  logic [5:0]  pos_q, pos;
  coef_t       coef;

  assign pos = in_sync ? 6'd0 : pos_q;
  always_ff @(posedge clk) begin
    if (rst) pos_q <= 6'd0;
    else     pos_q <= pos + 6'd1;
  end
  assign coef = kh_coef(pos[2:0], pos[5:3]);

  // Stage 0 registers the operands; stage k (1..NS) adds partial product k-1.
  logic signed [PW-1:0] mcand [NS+1];
  logic signed [PW-1:0] acc   [NS+1];
  logic [COEF_W-1:0]    mant  [NS+1];
  logic [1:0]           shf   [NS+1];

  always_ff @(posedge clk) begin
    mcand[0] <= PW'(signed'(y_in));
    acc[0]   <= '0;
    mant[0]  <= coef.mant;
    shf[0]   <= coef.shift;
    for (int k = 1; k <= NS; k++) begin
      mcand[k] <= mcand[k-1];
      mant[k]  <= mant[k-1];
      shf[k]   <= shf[k-1];
      acc[k]   <= mant[k-1][k-1] ? acc[k-1] + (mcand[k-1] <<< (k-1)) : acc[k-1];
    end
  end

  // Scale, round to nearest, saturate.
  logic signed [SW-1:0] scaled;
  logic signed [SW-COEF_FRAC-1:0] rounded_q;
  assign scaled = (SW'(acc[NS]) <<< shf[NS]) + (SW'(1) <<< (COEF_FRAC - 1))
                  - SW'(acc[NS] < 0);

  always_ff @(posedge clk) begin
    rounded_q <= scaled[SW-1:COEF_FRAC];
    if (rounded_q > (SW-COEF_FRAC)'(2047))
      x_out <= 12'sd2047;
    else if (rounded_q < -(SW-COEF_FRAC)'(2048))
      x_out <= -12'sd2048;
    else
      x_out <= rounded_q[NORM_W-1:0];
  end
endmodule
