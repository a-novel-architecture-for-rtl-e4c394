// delay_line - N-cycle register delay of a W-bit word, used to keep the
// operands of the lifting datapath aligned with the pipelined multipliers.
// N = 0 gives a plain wire. No reset: the data carried needs none; the
// valid flags that travel alongside are reset where they are created.
module delay_line #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [N];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < N; i++) r[i] <= r[i-1];
    end
    assign q = r[N-1];
  end

endmodule
