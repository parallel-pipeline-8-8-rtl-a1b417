// Testbench of the normaliser: streams blocks of 23-bit coefficients
// (random at several magnitudes, plus values that must saturate) and
// compares each output, 16 clocks later, with round(K_H(u,v) * Y) where
// K_H is computed here in floating point from the kernel's row norms and
// quantised to 18 fraction bits, saturated to 12 bits.
module tb_ict_normalizer;
  import ict_tb_pkg::*;
  localparam int NB = 30, LAT = 16;
  logic clk = 0, rst = 1, in_sync = 0;
  logic [22:0] y_in = '0;
  logic [11:0] x_out;
  int checks = 0, failures = 0, n_sat = 0;
  longint yv [NB * 64];

  ict_normalizer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100 * NB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB * 64; i++)
      case ((i / 64) % 4)
        0: yv[i] = longint'($signed(23'($urandom)));
        1: yv[i] = longint'($signed(16'($urandom)));
        2: yv[i] = longint'($signed(12'($urandom)));
        default: yv[i] = (i % 2) ? -longint'(1 << 22) : longint'((1 << 22) - 1);
      endcase
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < NB * 64 + LAT; t++) begin
      in_sync = (t % 64 == 0);
      y_in    = (t < NB * 64) ? 23'(yv[t]) : '0;
      if (t >= LAT) begin
        int n, u, v, e;
        n = (t - LAT) % 64;
        u = n % 8;
        v = n / 8;
        e = norm_ref(yv[t - LAT], u, v);
        if (e == 2047 || e == -2048) n_sat++;
        checks++;
        if ($signed(x_out) != e) begin
          failures++;
          if (failures < 10) $display("clock %0d (%0d,%0d) y=%0d: got %0d expected %0d",
                                      t, u, v, yv[t-LAT], $signed(x_out), e);
        end
      end
      @(negedge clk);
    end
    if (n_sat == 0) begin failures++; $display("saturation never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
