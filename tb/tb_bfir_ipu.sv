// tb_bfir_ipu: checks the inner product unit: each of its L outputs must be
// the inner product of the matching row of the input matrix with the shared
// weight vector. Random matrices (not only Toeplitz ones) are used so a row
// swap would show.
module tb_bfir_ipu;
  import bfir_tb_pkg::*;

  localparam int L  = 4;
  localparam int WX = 8;
  localparam int WH = 8;
  localparam int WR = WX + WH + $clog2(L);

  logic signed [WX-1:0] s_rows [L][L];
  logic signed [WH-1:0] coef   [L];
  logic signed [WR-1:0] r_blk  [L];
  int checks = 0;
  int failures = 0;

  bfir_ipu #(.L(L), .WX(WX), .WH(WH)) dut (.s_rows(s_rows), .coef(coef), .r_blk(r_blk));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int l = 0; l < L; l++)
        for (int j = 0; j < L; j++) s_rows[l][j] = WX'(rand_signed(WX));
      for (int j = 0; j < L; j++) coef[j] = WH'(rand_signed(WH));
      #1;
      for (int l = 0; l < L; l++) begin
        longint exp_v;
        exp_v = 0;
        for (int j = 0; j < L; j++) exp_v += longint'(s_rows[l][j]) * longint'(coef[j]);
        checks++;
        if (longint'(r_blk[l]) != exp_v) begin
          failures++;
          $display("IPU row %0d mismatch: got %0d expected %0d", l, r_blk[l], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
