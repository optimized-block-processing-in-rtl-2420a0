// bfir_reconfig: reconfigurable transpose-form block FIR filter.
//
// Computes L outputs of an N-tap FIR filter y(n) = sum_i h(i) x(n-i) per clock
// cycle, with the coefficients of one of NFILT stored filters. The filter is
// split into M = N/L short weight vectors c_m = [h(mL) .. h(mL+L-1)], so that
//     y(kL-l) = sum_m  sum_j h(mL+j) x((k-m)L-l-j)
// i.e. block k of outputs is the sum of S_{k-m}^0 * c_m over m, where S_k^0 is
// the L x L Toeplitz matrix of the input samples of block k. The structure:
//   CSU  - coefficient ROMs, all N taps of the selected filter per cycle;
//   RU   - forms S_k^0 from the current block and the previous one;
//   IPU  - M units in parallel, the (m+1)th computes r_k^m = S_k^0 * c_{M-1-m};
//   PAU  - transpose-form delay-and-add chain, y_k = sum_m r_{k-M+1+m}^m.
// The decomposition and the four units follow the published structure; the word lengths,
// the valid strobe and the output register are this design's choices.
//
// Interface: x_blk[j] = x(kL-j) is taken when in_valid is high; y_blk[l] =
// y(kL-l) for that block appears one cycle later with out_valid. filt_sel is
// sampled every cycle by the CSU and used for blocks taken from the next
// cycle on; the M-1 output blocks after a change mix old and new coefficients,
// as the partial sums of the old filter are still in the PAU. Cycle time is
// one multiplier, the IPC adder tree and one PAU adder.
module bfir_reconfig #(
  parameter int unsigned L     = 4,
  parameter int unsigned N     = 16,
  parameter int unsigned WX    = 8,
  parameter int unsigned WH    = 8,
  parameter int unsigned NFILT = 4,
  localparam int unsigned M    = N / L,
  localparam int unsigned WR   = WX + WH + $clog2(L),
  localparam int unsigned WY   = WX + WH + $clog2(N),
  localparam int unsigned WS   = (NFILT > 1) ? $clog2(NFILT) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [WX-1:0] x_blk [L],
  input  logic [WS-1:0]        filt_sel,
  output logic signed [WY-1:0] y_blk [L],
  output logic                 out_valid
);

  logic signed [WH-1:0] coef   [N];
  logic signed [WX-1:0] s_rows [L][L];
  logic signed [WR-1:0] r_blk  [M][L];

  bfir_csu #(.N(N), .WH(WH), .NFILT(NFILT)) u_csu (
    .clk  (clk),
    .rst  (rst),
    .sel  (filt_sel),
    .coef (coef)
  );

  bfir_ru #(.L(L), .WX(WX)) u_ru (
    .clk    (clk),
    .rst    (rst),
    .en     (in_valid),
    .x_blk  (x_blk),
    .s_rows (s_rows)
  );

  for (genvar m = 0; m < M; m++) begin : g_ipu
    // The (m+1)th IPU takes weight vector c_{M-1-m}.
    logic signed [WH-1:0] cvec [L];
    for (genvar j = 0; j < L; j++) begin : g_c
      assign cvec[j] = coef[(M-1-m)*L + j];
    end

    bfir_ipu #(.L(L), .WX(WX), .WH(WH)) u_ipu (
      .s_rows (s_rows),
      .coef   (cvec),
      .r_blk  (r_blk[m])
    );
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

  initial assert (N % L == 0) else $error("bfir_reconfig: N must be a multiple of L");

endmodule
