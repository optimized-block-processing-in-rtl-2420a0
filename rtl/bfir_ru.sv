// bfir_ru: register unit (RU) of the block transpose-form FIR filter.
//
// Each accepted cycle k brings a block x_k of L samples, element j holding
// x(kL-j) (newest first). The RU keeps the L-1 newest samples of the previous
// block in registers and forms the L rows of the Toeplitz input matrix S_k^0:
//     s_rows[l][j] = x(kL-l-j),   0 <= l, j <= L-1,
// which needs the 2L-1 samples x(kL) .. x(kL-2L+2). The register arrangement
// (L-1 delay registers on the first L-1 samples of the block) follows the
// published register unit for L = 4. The rows are combinational from
// x_blk and the registers; the registers load when en is high. Synchronous
// active-high reset clears them (samples before the first block read as 0),
// which is this design's choice.
module bfir_ru #(
  parameter int unsigned L  = 4,
  parameter int unsigned WX = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [WX-1:0] x_blk  [L],
  output logic signed [WX-1:0] s_rows [L][L]
);

  // prev[j] = x(kL-L-j), the first L-1 samples of the previous block.
  logic signed [WX-1:0] prev [L-1];
  // win[t] = x(kL-t), t = 0 .. 2L-2.
  logic signed [WX-1:0] win  [2*L-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < L - 1; j++) prev[j] <= '0;
    end else if (en) begin
      for (int j = 0; j < L - 1; j++) prev[j] <= x_blk[j];
    end
  end

  always_comb begin
    for (int t = 0; t < L; t++)         win[t] = x_blk[t];
    for (int t = L; t < 2 * L - 1; t++) win[t] = prev[t-L];
    for (int l = 0; l < L; l++)
      for (int j = 0; j < L; j++)
        s_rows[l][j] = win[l+j];
  end

  initial assert (L >= 2) else $error("bfir_ru: L must be at least 2");

endmodule
