// Testbench of the J4e processor: feeds the a-stream of random rows in the
// slot order of the input processor (a3, a2, a1, a0 in slot classes 0..3
// of the row after) and checks Y0/Y4 in phase 7 two rows later and Y2/Y6
// in phase 5 three rows later against the 4x4 even kernel
// [1 1 1 1; 1 -1 -1 1; 3 1 -1 -3; 1 -3 3 -1].
module tb_ict_j4e_proc;
  localparam int OW = 16, NROWS = 300;
  logic clk = 0;
  logic [2:0] phase = '0;
  logic [OW-1:0] a_even = '0, y_add, y_sub;
  int checks = 0, failures = 0;
  int a [NROWS][4];

  ict_j4e_proc #(.OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10 * 8 * NROWS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what, input int r);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("row %0d %s: got %0d expected %0d", r, what, got, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < NROWS; r++)
      for (int i = 0; i < 4; i++)
        a[r][i] = (r % 5 == 0) ? ((i % 2) ? -1023 : 1022) : int'($signed(11'($urandom)));
    @(negedge clk);
    for (int R = 0; R < NROWS; R++) begin
      for (int p = 0; p < 8; p++) begin
        phase = 3'(p);
        a_even = (R >= 1) ? OW'(a[R-1][3 - p / 2]) : '0;
        if (p == 7 && R >= 2) begin
          int r;
          r = R - 2;
          check($signed(y_add), a[r][0] + a[r][1] + a[r][2] + a[r][3], "Y0", r);
          check($signed(y_sub), a[r][0] - a[r][1] - a[r][2] + a[r][3], "Y4", r);
        end
        if (p == 5 && R >= 3) begin
          int r;
          r = R - 3;
          check($signed(y_add), 3*a[r][0] + a[r][1] - a[r][2] - 3*a[r][3], "Y2", r);
          check($signed(y_sub), a[r][0] - 3*a[r][1] + 3*a[r][2] - a[r][3], "Y6", r);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
