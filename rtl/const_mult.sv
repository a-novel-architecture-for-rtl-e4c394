// const_mult - pipelined multiplication by a constant with shifted integer adds.
//
// y = floor(x * C / 2^FRAC), with C an unsigned integer constant (a coefficient
// magnitude scaled by 2^FRAC). For every set bit i of C the operand shifted left
// by i is one partial product; the partial products are summed in a balanced
// binary adder tree with one register after each adder level, so the product is
// exact until the final arithmetic right shift drops the FRAC fraction bits.
// Multiplication by a constant through shifted additions, and a register stage
// after each add level, follow the document; the balanced tree arrangement
// (rather than a Horner chain) is this design's choice, made because the
// partial products are summed exactly, so truncation happens only once.
//
// Interface: x (signed, W_IN bits) in, y (signed, W_OUT bits) out. No handshake:
// the block is a free-running pipeline.
// Timing: LATENCY = ceil(log2(popcount(C))) clock cycles; a constant with a
// single set bit (a pure shift) has latency 0 and is combinational.
module const_mult
  import dwt_pkg::*;
#(
  parameter int unsigned C     = C_GAMMA,
  parameter int unsigned FRAC  = COEF_FRAC,
  parameter int unsigned W_IN  = 20,
  parameter int unsigned W_OUT = 20
) (
  input  logic                    clk,
  input  logic signed [W_IN-1:0]  x,
  output logic signed [W_OUT-1:0] y
);

  localparam int unsigned NT      = popcount(C);
  localparam int unsigned LATENCY = tree_levels(C);
  localparam int unsigned NP      = 1 << LATENCY;   // leaves of the tree
  localparam int unsigned WP      = W_IN + $clog2(C + 1) + 1;  // exact product width

  // leaves: shifted copies of x, zero for unused leaves
  logic signed [WP-1:0] leaf [NP];
  always_comb begin
    for (int k = 0; k < NP; k++) begin
      if (k < NT) leaf[k] = WP'(x) <<< setbit_pos(C, k);
      else        leaf[k] = '0;
    end
  end

  logic signed [WP-1:0] prod;

  if (LATENCY == 0) begin : g_shift
    assign prod = leaf[0];
  end else begin : g_tree
    // node[l][i]: registered sum at tree level l (1..LATENCY)
    logic signed [WP-1:0] node [1:LATENCY][NP/2];
    always_ff @(posedge clk) begin
      for (int l = 1; l <= LATENCY; l++) begin
        for (int i = 0; i < (NP >> l); i++) begin
          if (l == 1) node[l][i] <= leaf[2*i] + leaf[2*i+1];
          else        node[l][i] <= node[l-1][2*i] + node[l-1][2*i+1];
        end
      end
    end
    assign prod = node[LATENCY][0];
  end

  // drop the fraction bits (floor); W_OUT must hold the integer part
  assign y = W_OUT'(prod >>> FRAC);

endmodule
