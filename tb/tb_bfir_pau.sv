// tb_bfir_pau: checks the pipelined adder unit. Random partial-output blocks
// r^0 .. r^{M-1} are applied with idle cycles between them; the output after
// accepted step k must be y_k = sum_m r^m_{k-M+1+m}, worked out from the
// testbench's record of the applied blocks, and must hold during idle cycles.
module tb_bfir_pau;
  import bfir_tb_pkg::*;

  localparam int L  = 4;
  localparam int M  = 4;
  localparam int WR = 18;
  localparam int WY = 20;

  logic clk = 1'b0;
  logic rst;
  logic en;
  logic signed [WR-1:0] r_blk [M][L];
  logic signed [WY-1:0] y_blk [L];
  int checks = 0;
  int failures = 0;

  longint hist [int][M][L];

  bfir_pau #(.L(L), .M(M), .WR(WR), .WY(WY)) dut (.clk(clk), .rst(rst), .en(en), .r_blk(r_blk), .y_blk(y_blk));

  always #5 clk = ~clk;

  function automatic longint expect_y(int k, int l);
    longint s;
    s = 0;
    for (int m = 0; m < M; m++)
      if (hist.exists(k - M + 1 + m)) s += hist[k-M+1+m][m][l];
    return s;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    rst = 1'b1;
    en = 1'b0;
    for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) r_blk[m][l] = '0;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    k = 0;
    while (k < 300) begin
      en = ($urandom_range(0, 3) != 0);
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) begin
          longint v;
          v = rand_signed(WR);
          r_blk[m][l] = WR'(v);
          if (en) hist[k][m][l] = v;
        end
      @(negedge clk);
      if (en) k++;
      if (k > 0)
        for (int l = 0; l < L; l++) begin
          checks++;
          if (longint'(y_blk[l]) != expect_y(k - 1, l)) begin
            failures++;
            $display("PAU step %0d lane %0d got %0d expected %0d", k - 1, l, y_blk[l], expect_y(k - 1, l));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
