// tb_bfir_ru: checks the register unit. A random sample stream is sent in
// blocks, with idle cycles (en low) in between; after each accepted block the
// rows must be s_rows[l][j] = x(kL-l-j), looked up in the testbench's own
// record of the stream (samples before the first block are zero).
module tb_bfir_ru;
  import bfir_tb_pkg::*;

  localparam int L  = 4;
  localparam int WX = 8;

  logic clk = 1'b0;
  logic rst;
  logic en;
  logic signed [WX-1:0] x_blk  [L];
  logic signed [WX-1:0] s_rows [L][L];
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;

  longint xs [int];   // sample history by time index

  bfir_ru #(.L(L), .WX(WX)) dut (.clk(clk), .rst(rst), .en(en), .x_blk(x_blk), .s_rows(s_rows));

  always #5 clk = ~clk;

  function automatic longint xv(int n);
    return xs.exists(n) ? xs[n] : 0;
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
    for (int j = 0; j < L; j++) x_blk[j] = '0;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    k = 1;
    while (k <= 300) begin
      if ($urandom_range(0, 3) == 0) begin
        en = 1'b0;
        for (int j = 0; j < L; j++) x_blk[j] = WX'(rand_signed(WX));
        idle_cycles++;
      end else begin
        en = 1'b1;
        for (int j = 0; j < L; j++) begin
          xs[k*L-j] = rand_signed(WX);
          x_blk[j] = WX'(xs[k*L-j]);
        end
        #1;
        // The rows are combinational: check them against block k now.
        for (int l = 0; l < L; l++)
          for (int j = 0; j < L; j++) begin
            checks++;
            if (longint'(s_rows[l][j]) != xv(k*L-l-j)) begin
              failures++;
              $display("RU block %0d row %0d col %0d got %0d expected %0d", k, l, j, s_rows[l][j], xv(k*L-l-j));
            end
          end
        k++;
      end
      @(negedge clk);
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
