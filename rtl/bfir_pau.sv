// bfir_pau: pipelined adder unit (PAU) of the block transpose-form FIR filter.
//
// Adds the M partial-output blocks r_k^0 .. r_k^{M-1} in transpose form: block
// r^0 goes into a row of L registers, every later stage adds its block r^m to
// the registered sum of the previous stage and registers the result, and the
// last stage adds r^{M-1}. So
//     y_k = r_k^{M-1} + r_{k-1}^{M-2} + ... + r_{k-M+1}^0 .
// This is the published delay-and-add chain, one lane per output of the
// block. The final sum is registered as well (this design's choice), so y
// holds the block for the inputs accepted at the previous clock edge where
// en was high. All registers advance only when en is high; synchronous reset
// clears them. Sums are full precision, WY bits.
module bfir_pau #(
  parameter int unsigned L  = 4,
  parameter int unsigned M  = 4,
  parameter int unsigned WR = 18,
  parameter int unsigned WY = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [WR-1:0] r_blk [M][L],
  output logic signed [WY-1:0] y_blk [L]
);

  // acc[m] = r^m plus the registered sum of the stages before it.
  logic signed [WY-1:0] acc [M][L];

  if (M == 1) begin : g_single
    always_comb
      for (int l = 0; l < L; l++) acc[0][l] = WY'(r_blk[0][l]);
  end else begin : g_chain
    logic signed [WY-1:0] d [M-1][L];

    always_comb begin
      for (int l = 0; l < L; l++) acc[0][l] = WY'(r_blk[0][l]);
      for (int m = 1; m < M; m++)
        for (int l = 0; l < L; l++)
          acc[m][l] = d[m-1][l] + WY'(r_blk[m][l]);
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int m = 0; m < M - 1; m++)
          for (int l = 0; l < L; l++) d[m][l] <= '0;
      end else if (en) begin
        for (int m = 0; m < M - 1; m++)
          for (int l = 0; l < L; l++) d[m][l] <= acc[m][l];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < L; l++) y_blk[l] <= '0;
    end else if (en) begin
      for (int l = 0; l < L; l++) y_blk[l] <= acc[M-1][l];
    end
  end

endmodule
