// End-to-end testbench of the 2-D ICT processor at its default sizes.
// Streams blocks back to back from reset: first a run of blocks with
// un-normalised output, then idle (invalid) blocks while the pipeline
// drains, then a run with normalised output.  Every coefficient is compared
// with the exact 2-D integer transform (or its normalised, rounded and
// saturated value), and the clock of every coefficient with the latency
// (123 clocks from x(0,0) to X(0,0) un-normalised, 139 normalised).
// Data sets: random in [-256,255], random in [-300,300], random full
// 10-bit, constant extremes.  It counts how often each mechanism happened
// (blocks transposed in each of the two buffer access modes, invalid
// blocks skipped, both output formats, saturation of the normaliser) and
// counts a failure for any that never happened.
module tb_ict2d_top;
  import ict_tb_pkg::*;

  localparam int NRAW = 12, NIDLE = 3, NNORM = 12;
  localparam int NBLK = NRAW + NIDLE + NNORM;
  localparam int LAT_RAW = 123, LAT_NORM = 139;

  logic clk = 0, rst = 1, in_valid = 0, norm_en = 0;
  logic [9:0] in_data = '0;
  logic out_valid, out_first, out_norm;
  logic [22:0] out_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  longint blk [NBLK][8][8];
  longint t0 [NBLK];
  bit     bvalid [NBLK];
  int n_mode [2] = '{0, 0};
  int n_idle = 0, n_raw = 0, n_norm = 0, n_sat = 0;

  ict2d_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sample(input int kind);
    case (kind)
      0: return longint'($urandom_range(511)) - 256;
      1: return longint'($urandom_range(600)) - 300;
      2: return longint'($signed(10'($urandom)));
      3: return 511;
      default: return -512;
    endcase
  endfunction

  int qi = 0;       // next valid block expected at the output
  int on = 0;       // coefficient index inside the current output block
  int ob = -1;      // block being output
  longint exp_v;

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      bvalid[b] = !(b >= NRAW && b < NRAW + NIDLE);
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          blk[b][r][c] = bvalid[b] ? sample(b % 5) : 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int b = 0; b < NBLK; b++) begin
      if (b == NRAW + NIDLE) norm_en = 1;
      t0[b] = cyc;
      if (bvalid[b]) n_mode[b % 2]++; else n_idle++;
      for (int n = 0; n < 64; n++) begin
        in_valid = bvalid[b];
        in_data  = 10'(blk[b][n / 8][n % 8]);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (LAT_NORM + 80) @(negedge clk);
    if (checks != (NRAW + NNORM) * 64) begin
      failures++;
      $display("only %0d coefficients seen", checks);
    end
    if (n_mode[0] == 0) begin failures++; $display("no block in buffer mode 0"); end
    if (n_mode[1] == 0) begin failures++; $display("no block in buffer mode 1"); end
    if (n_idle == 0)    begin failures++; $display("no invalid block"); end
    if (n_raw == 0)     begin failures++; $display("no un-normalised output"); end
    if (n_norm == 0)    begin failures++; $display("no normalised output"); end
    if (n_sat == 0)     begin failures++; $display("no saturation"); end
    $display("mechanisms: mode0=%0d mode1=%0d idle=%0d raw=%0d norm=%0d saturated=%0d",
             n_mode[0], n_mode[1], n_idle, n_raw, n_norm, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      if (out_first) begin
        while (qi < NBLK && !bvalid[qi]) qi++;
        ob = qi++;
        on = 0;
      end
      if (ob >= 0 && ob < NBLK) begin
        int u, v;
        longint lat;
        u = on % 8;
        v = on / 8;
        if (out_norm) begin
          exp_v = norm_ref(j2d_ref(blk[ob], u, v), u, v);
          lat = LAT_NORM;
          n_norm++;
          if (exp_v == 2047 || exp_v == -2048) n_sat++;
        end else begin
          exp_v = j2d_ref(blk[ob], u, v);
          lat = LAT_RAW;
          n_raw++;
        end
        checks++;
        if ($signed(out_data) != exp_v || cyc != t0[ob] + lat + on) begin
          failures++;
          if (failures < 10)
            $display("block %0d X(%0d,%0d): got %0d at %0d, expected %0d at %0d",
                     ob, u, v, $signed(out_data), cyc, exp_v, t0[ob] + lat + on);
        end
      end
      on++;
    end
  end
endmodule
