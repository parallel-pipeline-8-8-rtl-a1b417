// Testbench of the J4o processor: feeds a7, a6, a5, a4 of random rows in
// slot classes 0..3 of the row after, and checks Y1, Y3, Y5 (phases 3, 5,
// 7 three rows later) and Y7 (phase 1 four rows later) against the 4x4 odd
// kernel [10 9 6 2; 9 -2 -10 -6; 6 -10 2 9; 2 -6 9 -10] applied to
// (a4, a5, a6, a7).
module tb_ict_j4o_proc;
  localparam int OW = 16, NROWS = 300;
  logic clk = 0;
  logic [2:0] phase = '0;
  logic [OW-1:0] a_odd = '0, y_odd;
  int checks = 0, failures = 0;
  int a [NROWS][8];   // indices 4..7 used
  int k [4][4] = '{'{10, 9, 6, 2}, '{9, -2, -10, -6}, '{6, -10, 2, 9}, '{2, -6, 9, -10}};

  ict_j4o_proc #(.OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10 * 8 * NROWS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int yref(input int r, input int m);
    int s = 0;
    for (int i = 0; i < 4; i++) s += k[m][i] * a[r][4 + i];
    return s;
  endfunction

  task automatic check(input int r, input int m);
    checks++;
    if ($signed(y_odd) != yref(r, m)) begin
      failures++;
      if (failures < 10) $display("row %0d Y%0d: got %0d expected %0d", r, 2*m+1, $signed(y_odd), yref(r, m));
    end
  endtask

  initial begin
    for (int r = 0; r < NROWS; r++)
      for (int i = 4; i < 8; i++)
        a[r][i] = (r % 5 == 0) ? ((i % 2) ? -1023 : 1022) : int'($signed(11'($urandom)));
    @(negedge clk);
    for (int R = 0; R < NROWS; R++) begin
      for (int p = 0; p < 8; p++) begin
        phase = 3'(p);
        a_odd = (R >= 1) ? OW'(a[R-1][7 - p / 2]) : '0;
        if (R >= 3 && p == 3) check(R - 3, 0);
        if (R >= 3 && p == 5) check(R - 3, 1);
        if (R >= 3 && p == 7) check(R - 3, 2);
        if (R >= 4 && p == 1) check(R - 4, 3);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
