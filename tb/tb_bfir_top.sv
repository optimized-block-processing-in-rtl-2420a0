// tb_bfir_top: end-to-end test of both filters at their default sizes
// (L = 4, N = 16, 8-bit samples and coefficients, four stored filters).
//
// A random stream of input blocks, with random idle cycles, feeds both
// filters; the reconfigurable one has its filter changed at random. Every
// output block of each filter is compared with a direct convolution kept by
// the testbench, out_valid must follow in_valid by one cycle, and whenever the
// reconfigurable filter has used filter FIXED_ID for the whole of an output's
// span the two outputs must be equal. Counted mechanisms: idle cycles, filter
// changes, output blocks mixing two filters after a change, full-scale input
// blocks (most negative value everywhere, the largest possible sum), and
// agreeing outputs of the two filters. Each must occur at least once.
module tb_bfir_top;
  import bfir_tb_pkg::*;

  localparam int L        = 4;
  localparam int N        = 16;
  localparam int WX       = 8;
  localparam int WH       = 8;
  localparam int NFILT    = 4;
  localparam int FIXED_ID = 0;
  localparam int M        = N / L;
  localparam int WY       = WX + WH + $clog2(N);
  localparam int NBLK     = 2000;

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  logic signed [WX-1:0] x_blk [L];
  logic [1:0] filt_sel;
  logic signed [WY-1:0] y_rcfg  [L];
  logic signed [WY-1:0] y_fixed [L];
  logic out_valid;

  int checks = 0;
  int failures = 0;

  bfir_top dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x_blk(x_blk), .filt_sel(filt_sel),
    .y_rcfg(y_rcfg), .y_fixed(y_fixed), .out_valid(out_valid));

  always #5 clk = ~clk;

  longint xs [int];
  int     fk [int];
  int     csu_f;
  int     kin = 1;
  int     kout = 1;
  bit     exp_valid;
  int     n_idle = 0, n_switch = 0, n_mixed = 0, n_fullscale = 0, n_agree = 0;

  function automatic longint xv(int n);
    return xs.exists(n) ? xs[n] : 0;
  endfunction

  // Output lane l of block k when block k-m used filter f(k-m); ff >= 0
  // forces one filter for every term.
  function automatic longint expect_y(int k, int l, int ff);
    longint s;
    int f;
    s = 0;
    for (int m = 0; m < M; m++)
      if (k - m >= 1) begin
        f = (ff >= 0) ? ff : fk[k-m];
        if (f >= 0)
          for (int j = 0; j < L; j++)
            s += ref_coef(f, m*L + j, WH) * xv((k-m)*L - l - j);
      end
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      csu_f = -1;
      exp_valid = 1'b0;
    end else begin
      exp_valid = in_valid;
      if (in_valid) begin
        fk[kin] = csu_f;
        for (int j = 0; j < L; j++) xs[kin*L - j] = longint'(x_blk[j]);
        kin++;
      end
      csu_f = int'(filt_sel);
    end
  end

  initial begin
    repeat (4 * NBLK + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit full;
    rst = 1'b1;
    in_valid = 1'b0;
    filt_sel = 2'(FIXED_ID);
    for (int j = 0; j < L; j++) x_blk[j] = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    while (kout <= NBLK) begin
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("out_valid %0b expected %0b", out_valid, exp_valid);
      end
      if (out_valid) begin
        bit mixed;
        bit all_fixed;
        mixed = 1'b0;
        all_fixed = (fk[kout] == FIXED_ID);
        for (int m = 1; m < M; m++)
          if (kout - m >= 1) begin
            if (fk[kout-m] != fk[kout]) mixed = 1'b1;
            if (fk[kout-m] != FIXED_ID) all_fixed = 1'b0;
          end
        if (mixed) n_mixed++;
        for (int l = 0; l < L; l++) begin
          checks += 2;
          if (longint'(y_rcfg[l]) != expect_y(kout, l, -1)) begin
            failures++;
            $display("reconfigurable: block %0d lane %0d got %0d expected %0d",
                     kout, l, y_rcfg[l], expect_y(kout, l, -1));
          end
          if (longint'(y_fixed[l]) != expect_y(kout, l, FIXED_ID)) begin
            failures++;
            $display("fixed: block %0d lane %0d got %0d expected %0d",
                     kout, l, y_fixed[l], expect_y(kout, l, FIXED_ID));
          end
          if (all_fixed) begin
            checks++;
            if (y_rcfg[l] != y_fixed[l]) failures++;
          end
        end
        if (all_fixed) n_agree++;
        kout++;
      end
      in_valid = ($urandom_range(0, 4) != 0);
      if (!in_valid) n_idle++;
      full = ($urandom_range(0, 15) == 0);
      if (in_valid && full) n_fullscale++;
      for (int j = 0; j < L; j++)
        x_blk[j] = full ? {1'b1, {(WX-1){1'b0}}} : WX'(rand_signed(WX));
      if ($urandom_range(0, 19) == 0) begin
        logic [1:0] ns;
        ns = 2'($urandom_range(0, NFILT - 1));
        if (ns != filt_sel) n_switch++;
        filt_sel = ns;
      end
      @(negedge clk);
    end
    $display("mechanisms: idle=%0d filter_changes=%0d mixed_blocks=%0d fullscale_blocks=%0d fixed_agree=%0d",
             n_idle, n_switch, n_mixed, n_fullscale, n_agree);
    checks += 5;
    if (n_idle == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_mixed == 0) failures++;
    if (n_fullscale == 0) failures++;
    if (n_agree == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
