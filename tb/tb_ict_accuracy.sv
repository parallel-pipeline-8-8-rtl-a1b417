// Accuracy workload of the processor with normalised output, following the
// IEEE 1180-1990 style measurement: for each input range (and its negated
// data) NBLK random 8x8 blocks are transformed, and the 12-bit outputs are
// compared with a double-precision reference (exact integer transform times
// the exact K_H, rounded to nearest with halves away from zero, and clipped to [-2048, 2047]).
// Reported and checked per range: peak error (<= 1), peak mean error
// (< 0.015), peak mean square error (< 0.06), overall mean error
// (< 0.0015) and overall mean square error (< 0.02).
module tb_ict_accuracy;
  import ict_tb_pkg::*;

  localparam int NBLK = 10000;
  localparam int NR = 6;
  int lo_r [NR] = '{-5, -5, -256, -256, -300, -300};
  int hi_r [NR] = '{ 5,  5,  255,  255,  300,  300};
  bit neg_r [NR] = '{0, 1, 0, 1, 0, 1};

  logic clk = 0, rst = 1, in_valid = 0, norm_en = 1;
  logic [9:0] in_data = '0;
  logic out_valid, out_first, out_norm;
  logic [22:0] out_data;
  int checks = 0, failures = 0;

  ict2d_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (NR * (NBLK + 8) * 64) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Blocks in flight, kept in a ring indexed by block number (at most
  // three blocks are in flight at any time).
  longint ring [8][8][8];
  int ib = 0;

  int range_i = 0;
  int ob = 0, on = 0;
  real sum_e [64], sum_e2 [64];
  int  pe = 0;
  longint cur [8][8];

  function automatic int ref_x(input longint x [8][8], input int u, input int v);
    real r;
    longint q;
    r = real'(j2d_ref(x, u, v)) * kh(u, v);
    q = (r < 0.0) ? -longint'($floor(-r + 0.5)) : longint'($floor(r + 0.5));
    if (q > 2047) q = 2047;
    if (q < -2048) q = -2048;
    return int'(q);
  endfunction

  task automatic report(input int ri);
    real pme = 0, pmse = 0, ome = 0, omse = 0;
    for (int i = 0; i < 64; i++) begin
      real me, mse;
      me  = sum_e[i] / NBLK;
      mse = sum_e2[i] / NBLK;
      if ((me < 0 ? -me : me) > pme) pme = (me < 0 ? -me : me);
      if (mse > pmse) pmse = mse;
      ome  += sum_e[i];
      omse += sum_e2[i];
    end
    ome  = ome / (64.0 * NBLK);
    if (ome < 0) ome = -ome;
    omse = omse / (64.0 * NBLK);
    $display("range [%0d,%0d]%s: PE=%0d PME=%f PMSE=%f OME=%f OMSE=%f",
             lo_r[ri], hi_r[ri], neg_r[ri] ? " negated" : "", pe, pme, pmse, ome, omse);
    checks += 5;
    if (pe > 1)        begin failures++; $display("  peak error too large"); end
    if (pme >= 0.015)  begin failures++; $display("  PME too large"); end
    if (pmse >= 0.06)  begin failures++; $display("  PMSE too large"); end
    if (ome >= 0.0015) begin failures++; $display("  OME too large"); end
    if (omse >= 0.02)  begin failures++; $display("  OMSE too large"); end
    for (int i = 0; i < 64; i++) begin sum_e[i] = 0; sum_e2[i] = 0; end
    pe = 0;
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin sum_e[i] = 0; sum_e2[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int ri = 0; ri < NR; ri++) begin
      for (int b = 0; b < NBLK; b++) begin
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            longint s;
            s = longint'($urandom_range(hi_r[ri] - lo_r[ri])) + lo_r[ri];
            ring[ib % 8][r][c] = neg_r[ri] ? -s : s;
          end
        for (int n = 0; n < 64; n++) begin
          in_valid = 1;
          in_data  = 10'(ring[ib % 8][n / 8][n % 8]);
          @(negedge clk);
        end
        ib++;
      end
    end
    in_valid = 0;
    repeat (300) @(negedge clk);
    if (ob != NR * NBLK) begin
      failures++;
      $display("only %0d blocks came out", ob);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      int u, v, e;
      if (out_first) begin
        cur = ring[ob % 8];
        on = 0;
      end
      u = on % 8;
      v = on / 8;
      e = int'($signed(out_data)) - ref_x(cur, u, v);
      sum_e[8 * u + v]  += real'(e);
      sum_e2[8 * u + v] += real'(e * e);
      if ((e < 0 ? -e : e) > pe) pe = (e < 0 ? -e : e);
      on++;
      if (on == 64) begin
        ob++;
        if (ob % NBLK == 0) report(ob / NBLK - 1);
      end
    end
  end
endmodule
