// tb_bfir_reconfig: end-to-end check of the reconfigurable block FIR filter
// against direct convolution, with idle cycles and filter changes, at the
// default size (L = 4, N = 16) and at L = 8, N = 32.
module tb_bfir_reconfig;
  logic clk = 1'b0;
  logic done_a, done_b;
  int checks_a, failures_a, checks_b, failures_b;

  always #5 clk = ~clk;

  bfir_fir_env #(.L(4), .N(16), .FIXED(1'b0), .NBLK(400)) env_a (
    .clk(clk), .done(done_a), .checks(checks_a), .failures(failures_a));
  bfir_fir_env #(.L(8), .N(32), .FIXED(1'b0), .NBLK(200)) env_b (
    .clk(clk), .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end
endmodule
