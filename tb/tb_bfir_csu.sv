// tb_bfir_csu: checks the coefficient storage unit. For a random sequence of
// filter selections, the outputs after each clock edge must be all N taps of
// the filter selected before that edge (one-cycle read), and after reset all
// zero.
module tb_bfir_csu;
  import bfir_tb_pkg::*;

  localparam int N     = 16;
  localparam int WH    = 8;
  localparam int NFILT = 4;

  logic clk = 1'b0;
  logic rst;
  logic [1:0] sel;
  logic signed [WH-1:0] coef [N];
  int checks = 0;
  int failures = 0;

  bfir_csu #(.N(N), .WH(WH), .NFILT(NFILT)) dut (.clk(clk), .rst(rst), .sel(sel), .coef(coef));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    rst = 1'b1;
    sel = 2'd2;
    @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (coef[i] != '0) begin
        failures++;
        $display("CSU not cleared by reset at tap %0d", i);
      end
    end
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      sel = 2'($urandom_range(0, NFILT - 1));
      prev = int'(sel);
      @(posedge clk);
      @(negedge clk);
      // The register now holds the filter that was selected before this edge.
      for (int i = 0; i < N; i++) begin
        checks++;
        if (longint'(coef[i]) != ref_coef(prev, i, WH)) begin
          failures++;
          $display("CSU f=%0d tap %0d got %0d expected %0d", prev, i, coef[i], ref_coef(prev, i, WH));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
