// Testbench of the 1-D J processor: streams rows of random and extreme
// samples back to back and compares every coefficient with the 8x8 integer
// matrix product, and the clock in which it appears with the 28-clock
// latency.  Rows 0..NROWS/2-1 get a sync pulse only at the first row; the
// rest get one at every row.  A gap of 45 idle clocks (long enough for the rows in flight to drain) with a re-sync to a new phase sits in
// the middle.
module tb_ict_j1d;
  import ict_tb_pkg::*;

  localparam int IW = 10, OW = 16, NROWS = 200, LAT = 28;

  logic clk = 0, rst = 1, in_sync = 0, in_valid = 0;
  logic [IW-1:0] x_in = '0;
  logic out_sync, out_valid;
  logic [OW-1:0] y_out;
  int checks = 0, failures = 0;
  longint cyc = 0;

  longint rows [NROWS][8];
  longint t0 [NROWS];

  ict_j1d #(.IW(IW), .OW(OW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus, driven on the falling edge.
  initial begin
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < 8; c++) begin
        case (r % 5)
          0: rows[r][c] = (c % 2) ? -512 : 511;
          1: rows[r][c] = (jmat(1, c) > 0) ? 511 : -512;
          default: rows[r][c] = longint'($signed(10'($urandom)));
        endcase
      end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < NROWS; r++) begin
      if (r == NROWS / 2) begin
        in_valid = 0;
        repeat (45) @(negedge clk);
      end
      for (int c = 0; c < 8; c++) begin
        in_sync  = (c == 0) && (r == 0 || r >= NROWS / 2);
        in_valid = 1;
        x_in     = IW'(rows[r][c]);
        if (c == 0) t0[r] = cyc;
        @(negedge clk);
      end
    end
    in_valid = 0;
    in_sync  = 0;
    repeat (LAT + 20) @(negedge clk);
    if (checks != NROWS * 8) begin
      failures++;
      $display("only %0d coefficients seen", checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker.
  int orow = 0, ok = 0;
  longint exp_y;
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      if (out_sync) ok = 0;
      if (orow < NROWS) begin
        exp_y = j1d_ref(rows[orow], ok);
        checks++;
        if ($signed(y_out) != exp_y || cyc != t0[orow] + LAT + ok) begin
          failures++;
          if (failures < 10)
            $display("row %0d Y%0d: got %0d at %0d, expected %0d at %0d",
                     orow, ok, $signed(y_out), cyc, exp_y, t0[orow] + LAT + ok);
        end
      end
      ok++;
      if (ok == 8) begin ok = 0; orow++; end
    end
  end
endmodule
