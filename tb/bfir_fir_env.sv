// bfir_fir_env: stimulus and reference checker for one block FIR filter.
//
// Drives a random sample stream, L samples per accepted block, with random
// idle cycles, into either the reconfigurable filter (FIXED = 0, with random
// filter changes) or the fixed-coefficient filter (FIXED = 1). It keeps its
// own record of every sample and of the filter in force for every block and
// checks each output block against the direct convolution
//     y(kL-l) = sum_m sum_j h_{f(k-m)}(mL+j) x((k-m)L-l-j),
// where f(k) is the filter whose coefficients were read for block k (the
// filter selected at the clock edge before the block; none, i.e. zero,
// straight after reset). It also checks that out_valid follows in_valid by
// exactly one cycle. Counts of the mechanisms exercised (idle cycles, filter
// changes, output blocks mixing two filters, full-scale blocks) are reported;
// one that never happened counts as a failure.
module bfir_fir_env #(
  parameter int L       = 4,
  parameter int N       = 16,
  parameter int WX      = 8,
  parameter int WH      = 8,
  parameter int NFILT   = 4,
  parameter bit FIXED   = 1'b0,
  parameter int FILT_ID = 0,
  parameter int NBLK    = 300
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import bfir_tb_pkg::*;

  localparam int M  = N / L;
  localparam int WY = WX + WH + $clog2(N);
  localparam int WS = (NFILT > 1) ? $clog2(NFILT) : 1;

  logic rst;
  logic in_valid;
  logic signed [WX-1:0] x_blk [L];
  logic [WS-1:0] filt_sel;
  logic signed [WY-1:0] y_blk [L];
  logic out_valid;

  if (FIXED) begin : g_fixed
    bfir_fixed #(.L(L), .N(N), .WX(WX), .WH(WH), .FILT_ID(FILT_ID)) dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .x_blk(x_blk),
      .y_blk(y_blk), .out_valid(out_valid));
  end else begin : g_rcfg
    bfir_reconfig #(.L(L), .N(N), .WX(WX), .WH(WH), .NFILT(NFILT)) dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .x_blk(x_blk), .filt_sel(filt_sel),
      .y_blk(y_blk), .out_valid(out_valid));
  end

  longint xs [int];
  int     fk [int];
  int     csu_f;
  int     kin;
  int     kout;
  bit     exp_valid;
  int     n_idle, n_switch, n_mixed, n_fullscale;

  function automatic longint xv(int n);
    return xs.exists(n) ? xs[n] : 0;
  endfunction

  function automatic longint hv(int f, int i);
    return (f < 0) ? 0 : ref_coef(f, i, WH);
  endfunction

  function automatic longint expect_y(int k, int l);
    longint s;
    s = 0;
    for (int m = 0; m < M; m++)
      if (k - m >= 1)
        for (int j = 0; j < L; j++)
          s += hv(fk[k-m], m*L + j) * xv((k-m)*L - l - j);
    return s;
  endfunction

  // Reference state, updated with the design at each rising edge.
  always @(posedge clk) begin
    if (rst) begin
      csu_f = FIXED ? FILT_ID : -1;
      exp_valid = 1'b0;
    end else begin
      exp_valid = in_valid;
      if (in_valid) begin
        fk[kin] = csu_f;
        for (int j = 0; j < L; j++) xs[kin*L - j] = longint'(x_blk[j]);
        kin++;
      end
      if (!FIXED && int'(filt_sel) < NFILT) csu_f = int'(filt_sel);
    end
  end

  initial begin
    bit full;
    done = 1'b0;
    checks = 0;
    failures = 0;
    kin = 1;
    kout = 1;
    n_idle = 0; n_switch = 0; n_mixed = 0; n_fullscale = 0;
    rst = 1'b1;
    in_valid = 1'b0;
    filt_sel = '0;
    for (int j = 0; j < L; j++) x_blk[j] = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    while (kout <= NBLK) begin
      // Check what the last rising edge produced.
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("env L=%0d N=%0d: out_valid %0b expected %0b", L, N, out_valid, exp_valid);
      end
      if (out_valid) begin
        bit mixed;
        mixed = 1'b0;
        for (int m = 1; m < M; m++)
          if (kout - m >= 1 && fk[kout-m] != fk[kout]) mixed = 1'b1;
        if (mixed) n_mixed++;
        for (int l = 0; l < L; l++) begin
          checks++;
          if (longint'(y_blk[l]) != expect_y(kout, l)) begin
            failures++;
            $display("env L=%0d N=%0d: block %0d lane %0d got %0d expected %0d",
                     L, N, kout, l, y_blk[l], expect_y(kout, l));
          end
        end
        kout++;
      end
      // Drive the next cycle.
      in_valid = ($urandom_range(0, 4) != 0);
      if (!in_valid) n_idle++;
      full = ($urandom_range(0, 15) == 0);
      if (in_valid && full) n_fullscale++;
      for (int j = 0; j < L; j++)
        x_blk[j] = full ? {1'b1, {(WX-1){1'b0}}} : WX'(rand_signed(WX));
      if (!FIXED && $urandom_range(0, 9) == 0) begin
        logic [WS-1:0] ns;
        ns = WS'($urandom_range(0, NFILT - 1));
        if (ns != filt_sel) n_switch++;
        filt_sel = ns;
      end
      @(negedge clk);
    end
    $display("env L=%0d N=%0d fixed=%0b: idle=%0d switches=%0d mixed_blocks=%0d fullscale=%0d",
             L, N, FIXED, n_idle, n_switch, n_mixed, n_fullscale);
    checks += 2;
    if (n_idle == 0) failures++;
    if (n_fullscale == 0) failures++;
    if (!FIXED) begin
      checks += 2;
      if (n_switch == 0) failures++;
      if (n_mixed == 0 && M > 1) failures++;
    end
    done = 1'b1;
  end

endmodule
