// Testbench of the output mixer: presents the eight coefficients of each
// row on the three inputs in the clocks where the arithmetic elements
// deliver them (junk in all other clocks) and checks that they leave in
// natural order, Y_k of row r in clock 8r + 28 + k.
module tb_ict_out_mixer;
  localparam int OW = 16, NROWS = 300;
  logic clk = 0;
  logic [2:0] phase = '0;
  logic [OW-1:0] y_add = '0, y_sub = '0, y_odd = '0, y_out;
  int checks = 0, failures = 0;
  logic [OW-1:0] yv [NROWS][8];

  ict_out_mixer #(.OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10 * 8 * NROWS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OW-1:0] val(input int r, input int k);
    return (r >= 0 && r < NROWS) ? yv[r][k] : OW'($urandom);
  endfunction

  initial begin
    for (int r = 0; r < NROWS; r++)
      for (int k = 0; k < 8; k++) yv[r][k] = OW'($urandom);
    @(negedge clk);
    for (int t = 0; t < 8 * NROWS; t++) begin
      int p, R;
      p = t % 8;
      R = t / 8;
      phase = 3'(p);
      y_add = OW'($urandom); y_sub = OW'($urandom); y_odd = OW'($urandom);
      case (p)
        7: begin y_add = val(R-2, 0); y_sub = val(R-2, 4); y_odd = val(R-3, 5); end
        3: y_odd = val(R-3, 1);
        5: begin y_add = val(R-3, 2); y_sub = val(R-3, 6); y_odd = val(R-3, 3); end
        1: y_odd = val(R-4, 7);
        default: ;
      endcase
      if (t >= 28 && (t - 28) / 8 < NROWS - 4) begin
        checks++;
        if (y_out !== yv[(t - 28) / 8][(t - 28) % 8]) begin
          failures++;
          if (failures < 10) $display("clock %0d: got %h expected %h", t, y_out, yv[(t-28)/8][(t-28)%8]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
