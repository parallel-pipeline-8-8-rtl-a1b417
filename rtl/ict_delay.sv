// Fixed delay line for control flags (valid, sync).  Delays `d` by N clock
// cycles; all stages clear on the synchronous active-high reset so that no
// stale flag leaves the line.  N = 0 is a wire.
module ict_delay #(
  parameter int W = 1,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_line
    logic [W-1:0] line [N];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < N; i++) line[i] <= '0;
      end else begin
        line[0] <= d;
        for (int i = 1; i < N; i++) line[i] <= line[i-1];
      end
    end
    assign q = line[N-1];
  end
endmodule
