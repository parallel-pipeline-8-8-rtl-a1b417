// Transpose buffer between the two 1-D processors, built from flip-flops.
//
// Eight shift registers of eight W-bit words.  Write enable W_j (one-hot,
// j = 0..7) shifts register j by one word: the word at its head is read out
// and the incoming word enters at its tail, so reading and writing share
// one shift and the buffer runs without gaps.  The 3-bit read select R
// steers the heads through a three-level pipelined 8:1 multiplexer (one
// select bit per level, each delayed to meet its data).
// Access alternates between two patterns every 64 clocks (bit 6 of a 7-bit
// counter):
//   mode 0: in clock n of the block, register n mod 8 shifts;
//   mode 1: in clock n of the block, register n div 8 shifts.
// A block written in one mode leaves, transposed, while the next block is
// written in the other mode: a row-wise written block is read column-wise
// and the next one the other way round.
// Interface: `in_sync` marks element (0,0) of a block (it realigns the
// counter if it is not already at a block boundary); blocks must follow
// each other without gaps.  Timing: element (r,c) of the block entering
// from clock T on, in row-major order, leaves in clock T + 67 + 8c + r, so
// the block leaves column by column; latency 67 clocks.
// Shift-register structure, W_j/R_k controls, 7-bit counter and 67-clock
// latency follow the document; the two access modes are this design's
// reading of how its serial shift registers transpose.
module ict_transpose #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_sync,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] d_out
);
  logic [6:0]   cnt_q, cnt;
  logic [2:0]   sel;          // R: index of the register read (and written)
  logic [7:0]   we;           // W_j
  logic [W-1:0] sr [8][8];
  logic [W-1:0] lvl1 [4];
  logic [W-1:0] lvl2 [2];
  logic [1:0]   sel_d1;
  logic         sel_d2;

  assign cnt = (in_sync && cnt_q[5:0] != 6'd0) ? 7'd0 : cnt_q;
  always_ff @(posedge clk) begin
    if (rst) cnt_q <= 7'd0;
    else     cnt_q <= cnt + 7'd1;
  end

  assign sel = cnt[6] ? cnt[5:3] : cnt[2:0];
  always_comb begin
    we = '0;
    we[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < 8; j++) begin
      if (we[j]) begin
        for (int k = 0; k < 7; k++) sr[j][k] <= sr[j][k+1];
        sr[j][7] <= d_in;
      end
    end
  end

  // Pipelined read multiplexer.
  always_ff @(posedge clk) begin
    for (int m = 0; m < 4; m++) lvl1[m] <= sel[0] ? sr[2*m+1][0] : sr[2*m][0];
    sel_d1 <= sel[2:1];
    for (int m = 0; m < 2; m++) lvl2[m] <= sel_d1[0] ? lvl1[2*m+1] : lvl1[2*m];
    sel_d2 <= sel_d1[1];
    d_out  <= sel_d2 ? lvl2[1] : lvl2[0];
  end
endmodule
