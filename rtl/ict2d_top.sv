// 8x8 forward 2-D integer cosine transform ICT(10,9,6,2,3,1) processor.
//
// Row-column method: a first 1-D J processor transforms each row of the
// 8x8 block, a flip-flop transpose buffer turns the rows into columns, a
// second 1-D J processor transforms the columns, and an optional output
// normaliser multiplies each coefficient by its entry of K_H and rounds to
// 12 bits.  All arithmetic before the normaliser is exact integer
// add/shift arithmetic, so rounding happens only in the last step.
// Interface:
//   in_data   10-bit two's complement samples, one per clock, rows in
//             natural order, blocks back to back.  The block grid is fixed
//             by reset: the first clock after `rst` falls carries x(0,0)
//             of a block, and every 64th clock after it as well.
//   in_valid  marks real data; it may change only at block boundaries.
//   norm_en   1: 12-bit normalised coefficients (sign-extended on
//             out_data); 0: 23-bit un-normalised coefficients Y.  Change it
//             only while no block is in flight.
//   out_data  coefficients column by column: X(0,0), X(1,0), ..., X(7,0),
//             X(0,1), ... where X(u,v) has vertical frequency u and
//             horizontal frequency v.
//   out_valid, out_first (X(0,0) of a block), out_norm (format of out_data).
// Timing: x(0,0) in clock T gives X(0,0) in clock T + 123 un-normalised
// (28 + 67 + 28) or T + 139 normalised (16 more); one coefficient per clock.
// Word lengths (16 bits between the stages, 23-bit Y, 12-bit normalised
// output), the block structure and the transpose latency follow the
// document; the input width, the sync/valid signals and the output format
// mux are this design's own.
module ict2d_top
  import ict_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [IN_W-1:0]   in_data,
  input  logic              norm_en,
  output logic              out_valid,
  output logic              out_first,
  output logic              out_norm,
  output logic [OUT_W-1:0]  out_data
);
  localparam int LAT_1D = 28;
  localparam int LAT_TR = 67;
  localparam int LAT_NM = 16;

  logic [5:0] cnt_q;
  logic       blk_sync, row_sync;

  always_ff @(posedge clk) begin
    if (rst) cnt_q <= 6'd0;
    else     cnt_q <= cnt_q + 6'd1;
  end
  assign blk_sync = (cnt_q == 6'd0);
  assign row_sync = (cnt_q[2:0] == 3'd0);

  // Stage 1: rows.
  logic              r_valid, r_blk;
  logic [MID_W-1:0]  r_data;
  ict_j1d #(.IW(IN_W), .OW(MID_W)) u_row (
    .clk, .rst, .in_sync(row_sync), .in_valid, .x_in(in_data),
    .out_sync(), .out_valid(r_valid), .y_out(r_data));
  ict_delay #(.W(1), .N(LAT_1D)) u_dly_blk1 (.clk, .rst, .d(blk_sync), .q(r_blk));

  // Transpose.
  logic              t_valid, t_blk;
  logic [MID_W-1:0]  t_data;
  ict_transpose #(.W(MID_W)) u_tr (.clk, .rst, .in_sync(r_blk), .d_in(r_data), .d_out(t_data));
  ict_delay #(.W(2), .N(LAT_TR)) u_dly_tr (.clk, .rst, .d({r_blk, r_valid}), .q({t_blk, t_valid}));

  // Stage 2: columns.
  logic              c_blk, c_valid;
  logic [OUT_W-1:0]  c_data;
  ict_j1d #(.IW(MID_W), .OW(OUT_W)) u_col (
    .clk, .rst, .in_sync(t_blk), .in_valid(t_valid), .x_in(t_data),
    .out_sync(c_blk), .out_valid(c_valid), .y_out(c_data));

  // Normalisation.
  logic               n_blk, n_valid;
  logic [NORM_W-1:0]  n_data;
  ict_normalizer #(.YW(OUT_W)) u_norm (.clk, .rst, .in_sync(c_blk), .y_in(c_data), .x_out(n_data));
  ict_delay #(.W(2), .N(LAT_NM)) u_dly_nm (.clk, .rst, .d({c_blk, c_valid}), .q({n_blk, n_valid}));

  always_comb begin
    out_norm = norm_en;
    if (norm_en) begin
      out_data  = OUT_W'(signed'(n_data));
      out_valid = n_valid;
      out_first = n_blk & n_valid;
    end else begin
      out_data  = c_data;
      out_valid = c_valid;
      out_first = c_blk & c_valid;
    end
  end

  // in_valid may change only at a block boundary.
  logic in_valid_q;
  always_ff @(posedge clk) in_valid_q <= in_valid;
  a_valid_per_block: assert property (@(posedge clk) disable iff (rst)
    (cnt_q != 6'd0) |-> (in_valid == in_valid_q));
endmodule
