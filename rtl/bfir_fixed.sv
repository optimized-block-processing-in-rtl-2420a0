// bfir_fixed: fixed-coefficient transpose-form block FIR filter built from
// multiple constant multiplication (MCM) units.
//
// Same block decomposition as the reconfigurable filter (L outputs per cycle,
// y_k = sum_m S_{k-m}^0 * c_m), but tailored to one filter, so there is no
// coefficient storage and no general inner product units. The input matrix
// S_k^0 holds only 2L-1 distinct samples x(kL) .. x(kL-2L+2) (it is Toeplitz),
// so each distinct sample is multiplied once, by one MCM unit, by all N
// constants, and the products are shared by every row and every weight vector
// that need them:
//     r_k^m(l) = sum_j P[l+j][(M-1-m)L + j],   P[t][i] = x(kL-t) * h(i),
// after which the same register unit and pipelined adder unit as the
// reconfigurable filter are used. Which filter is built is chosen by FILT_ID
// (a filter of bfir_pkg::rom_coef). Dropping the CSU and IPUs and using MCM
// units follows the published block transpose-form structure; the exact MCM arrangement (one unit per distinct
// sample, no subexpression sharing between constants) is this design's own.
//
// Interface and timing as bfir_reconfig: block taken with in_valid, result one
// cycle later with out_valid.
module bfir_fixed #(
  parameter int unsigned L       = 4,
  parameter int unsigned N       = 16,
  parameter int unsigned WX      = 8,
  parameter int unsigned WH      = 8,
  parameter int unsigned FILT_ID = 0,
  localparam int unsigned M      = N / L,
  localparam int unsigned WP     = WX + WH,
  localparam int unsigned WR     = WX + WH + $clog2(L),
  localparam int unsigned WY     = WX + WH + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [WX-1:0] x_blk [L],
  output logic signed [WY-1:0] y_blk [L],
  output logic                 out_valid
);

  logic signed [WX-1:0] s_rows [L][L];
  logic signed [WX-1:0] win    [2*L-1];
  logic signed [WP-1:0] prod   [2*L-1][N];
  logic signed [WR-1:0] r_blk  [M][L];

  bfir_ru #(.L(L), .WX(WX)) u_ru (
    .clk    (clk),
    .rst    (rst),
    .en     (in_valid),
    .x_blk  (x_blk),
    .s_rows (s_rows)
  );

  // Distinct samples: win[t] = x(kL-t) is row 0 for t < L, column L-1 beyond.
  always_comb begin
    for (int t = 0; t < L; t++)         win[t] = s_rows[0][t];
    for (int t = L; t < 2 * L - 1; t++) win[t] = s_rows[t-L+1][L-1];
  end

  for (genvar t = 0; t < 2 * L - 1; t++) begin : g_mcm
    bfir_mcm #(.N(N), .WX(WX), .WH(WH), .FILT_ID(FILT_ID)) u_mcm (
      .x (win[t]),
      .p (prod[t])
    );
  end

  always_comb begin
    for (int m = 0; m < M; m++)
      for (int l = 0; l < L; l++) begin
        r_blk[m][l] = '0;
        for (int j = 0; j < L; j++)
          r_blk[m][l] = r_blk[m][l] + WR'(prod[l+j][(M-1-m)*L + j]);
      end
  end

  bfir_pau #(.L(L), .M(M), .WR(WR), .WY(WY)) u_pau (
    .clk   (clk),
    .rst   (rst),
    .en    (in_valid),
    .r_blk (r_blk),
    .y_blk (y_blk)
  );

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  initial assert (N % L == 0) else $error("bfir_fixed: N must be a multiple of L");

endmodule
