// Testbench of the transpose buffer: blocks of random words back to back
// with a sync at every block; element (r,c) of a block entering from
// clock T must leave in clock T + 67 + 8c + r.  Blocks alternate between
// the two access modes, so both are checked.
module tb_ict_transpose;
  localparam int W = 16, NB = 20, LAT = 67;
  logic clk = 0, rst = 1, in_sync = 0;
  logic [W-1:0] d_in = '0, d_out;
  int checks = 0, failures = 0;
  logic [W-1:0] m [NB][64];

  ict_transpose #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100 * NB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 64; n++) m[b][n] = W'($urandom);
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);       // start off the counter's block grid
    for (int t = 0; t < 64 * NB + LAT; t++) begin
      in_sync = (t % 64 == 0) && t < 64 * NB;
      d_in    = (t < 64 * NB) ? m[t / 64][t % 64] : W'($urandom);
      if (t >= LAT && (t - LAT) / 64 < NB) begin
        int b, q, r, c;
        b = (t - LAT) / 64;
        q = (t - LAT) % 64;
        c = q / 8;
        r = q % 8;
        checks++;
        if (d_out !== m[b][8 * r + c]) begin
          failures++;
          if (failures < 10) $display("block %0d (%0d,%0d): got %h expected %h", b, r, c, d_out, m[b][8*r+c]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
