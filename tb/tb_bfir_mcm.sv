// tb_bfir_mcm: checks that the shift-and-add MCM unit gives x * h(i) for all
// N constants of the chosen filter, for every 8-bit input value. Two filters
// are built so that constants of both signs and many digit patterns occur.
module tb_bfir_mcm;
  import bfir_tb_pkg::*;

  localparam int N  = 16;
  localparam int WX = 8;
  localparam int WH = 8;
  localparam int WP = WX + WH;

  logic signed [WX-1:0] x;
  logic signed [WP-1:0] p0 [N];
  logic signed [WP-1:0] p3 [N];
  int checks = 0;
  int failures = 0;

  bfir_mcm #(.N(N), .WX(WX), .WH(WH), .FILT_ID(0)) dut0 (.x(x), .p(p0));
  bfir_mcm #(.N(N), .WX(WX), .WH(WH), .FILT_ID(3)) dut3 (.x(x), .p(p3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (WX - 1)); v < (1 << (WX - 1)); v++) begin
      x = WX'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (longint'(p0[i]) != longint'(v) * ref_coef(0, i, WH)) begin
          failures++;
          $display("MCM f0 x=%0d i=%0d got %0d", v, i, p0[i]);
        end
        if (longint'(p3[i]) != longint'(v) * ref_coef(3, i, WH)) begin
          failures++;
          $display("MCM f3 x=%0d i=%0d got %0d", v, i, p3[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
