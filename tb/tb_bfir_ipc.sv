// tb_bfir_ipc: checks the inner product cell against a directly computed
// sum of products, on random rows and weight vectors and on the extreme
// values (all most-negative inputs, which give the largest sum).
module tb_bfir_ipc;
  import bfir_tb_pkg::*;

  localparam int L  = 4;
  localparam int WX = 8;
  localparam int WH = 8;
  localparam int WR = WX + WH + $clog2(L);

  logic signed [WX-1:0] row  [L];
  logic signed [WH-1:0] coef [L];
  logic signed [WR-1:0] r;
  int checks = 0;
  int failures = 0;

  bfir_ipc #(.L(L), .WX(WX), .WH(WH)) dut (.row(row), .coef(coef), .r(r));

  task automatic check_one();
    longint exp_v;
    exp_v = 0;
    for (int j = 0; j < L; j++) exp_v += longint'(row[j]) * longint'(coef[j]);
    #1;
    checks++;
    if (longint'(r) != exp_v) begin
      failures++;
      $display("IPC mismatch: got %0d expected %0d", r, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < L; j++) begin
        row[j]  = WX'(rand_signed(WX));
        coef[j] = WH'(rand_signed(WH));
      end
      check_one();
    end
    for (int j = 0; j < L; j++) begin
      row[j]  = {1'b1, {(WX-1){1'b0}}};
      coef[j] = {1'b1, {(WH-1){1'b0}}};
    end
    check_one();
    for (int j = 0; j < L; j++) coef[j] = {1'b0, {(WH-1){1'b1}}};
    check_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
