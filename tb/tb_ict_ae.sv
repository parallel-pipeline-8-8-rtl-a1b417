// Testbench of the pipelined arithmetic element: random additions and
// subtractions (with carries across the middle of the word) issued once
// per half-rate slot; each result must appear exactly two slots later.
module tb_ict_ae;
  localparam int W = 16, N = 2000;
  logic clk = 0, ce = 0, sub = 0;
  logic [W-1:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;
  logic [W-1:0] expq [$];

  ict_ae #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < N + 2; i++) begin
      // first clock of the slot: enable low, operands may change freely
      ce = 0;
      a = W'($urandom); b = W'($urandom); sub = 1'($urandom);
      @(negedge clk);
      // second clock: operands for this slot, captured at its end
      ce = 1;
      a = (i % 7 == 0) ? 16'h00ff : W'($urandom);
      b = (i % 7 == 0) ? 16'h0001 : W'($urandom);
      sub = (i % 7 == 0) ? 1'b0 : 1'($urandom);
      expq.push_back(sub ? a - b : a + b);
      if (i >= 2) begin
        logic [W-1:0] e;
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("op %0d: got %h expected %h", i - 2, y, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
