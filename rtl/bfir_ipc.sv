// bfir_ipc: inner product cell (IPC).
//
// Computes the L-point inner product of one row of the input matrix S_k^0 with
// a weight vector c_m = [h(mL), h(mL+1), ..., h(mL+L-1)]:
//     r = sum_j row[j] * coef[j]
// with L parallel multipliers feeding a balanced binary adder tree of log2(L)
// levels, as in the cell drawn for L = 4 (four multipliers, two adders, one
// adder). Purely combinational. L must be a power of two. The result is kept
// at full precision, WX + WH + log2(L) bits, which is this design's choice.
module bfir_ipc #(
  parameter int unsigned L  = 4,
  parameter int unsigned WX = 8,
  parameter int unsigned WH = 8,
  localparam int unsigned WR = WX + WH + $clog2(L)
) (
  input  logic signed [WX-1:0] row  [L],
  input  logic signed [WH-1:0] coef [L],
  output logic signed [WR-1:0] r
);

  // Heap-ordered adder tree: node n has children 2n+1 and 2n+2; the leaves
  // L-1 .. 2L-2 hold the products, node 0 the sum.
  logic signed [WR-1:0] node [2*L-1];

  always_comb begin
    for (int j = 0; j < L; j++)
      node[L-1+j] = WR'(row[j] * coef[j]);
    for (int n = L - 2; n >= 0; n--)
      node[n] = node[2*n+1] + node[2*n+2];
    r = node[0];
  end

  initial assert (L >= 2 && (L & (L - 1)) == 0)
    else $error("bfir_ipc: L must be a power of two");

endmodule
