// tb_bfir_fixed: end-to-end check of the fixed-coefficient MCM block FIR
// filter against direct convolution, at the default size (L = 4, N = 16,
// filter 0), at L = 2 with a 6-tap filter (three weight vectors, filter 1),
// and at L = 8, N = 32 (filter 2).
module tb_bfir_fixed;
  logic clk = 1'b0;
  logic done_a, done_b, done_c;
  int checks_a, failures_a, checks_b, failures_b, checks_c, failures_c;

  always #5 clk = ~clk;

  bfir_fir_env #(.L(4), .N(16), .FIXED(1'b1), .FILT_ID(0), .NBLK(400)) env_a (
    .clk(clk), .done(done_a), .checks(checks_a), .failures(failures_a));
  bfir_fir_env #(.L(2), .N(6), .FIXED(1'b1), .FILT_ID(1), .NBLK(400)) env_b (
    .clk(clk), .done(done_b), .checks(checks_b), .failures(failures_b));
  bfir_fir_env #(.L(8), .N(32), .FIXED(1'b1), .FILT_ID(2), .NBLK(200)) env_c (
    .clk(clk), .done(done_c), .checks(checks_c), .failures(failures_c));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b && done_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c);
    $finish;
  end
endmodule
