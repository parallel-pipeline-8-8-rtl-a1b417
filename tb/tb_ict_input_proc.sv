// Testbench of the input processor: rows of random samples back to back;
// during phases 1, 3, 5, 7 of the following row a_even must hold a3, a2,
// a1, a0 and a_odd a7, a6, a5, a4, where a_n = x_n + x_(7-n) and
// a_(n+4) = x_n - x_(7-n).
module tb_ict_input_proc;
  localparam int IW = 10, OW = 16, NROWS = 300;
  logic clk = 0;
  logic [2:0] phase = '0;
  logic [IW-1:0] x_in = '0;
  logic [OW-1:0] a_even, a_odd;
  int checks = 0, failures = 0;
  int x [NROWS][8];

  ict_input_proc #(.IW(IW), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10 * 8 * NROWS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < 8; c++)
        x[r][c] = (r % 4 == 0) ? ((c < 4) ? 511 : -512) : int'($signed(10'($urandom)));
    @(negedge clk);
    for (int r = 0; r < NROWS; r++) begin
      for (int c = 0; c < 8; c++) begin
        phase = 3'(c);
        x_in  = IW'(x[r][c]);
        if (r > 0 && c[0]) begin
          int n, se, so;
          n  = 3 - c / 2;                      // a3, a2, a1, a0
          se = x[r-1][n] + x[r-1][7-n];
          so = x[r-1][n] - x[r-1][7-n];        // a(n+4)
          checks += 2;
          if ($signed(a_even) != se || $signed(a_odd) != so) begin
            failures++;
            if (failures < 10)
              $display("row %0d n %0d: got %0d/%0d expected %0d/%0d",
                       r - 1, n, $signed(a_even), $signed(a_odd), se, so);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
