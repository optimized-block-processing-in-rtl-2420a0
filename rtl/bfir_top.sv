// bfir_top: the two block transpose-form FIR filters side by side.
//
// One stream of input blocks (L samples per cycle, x_blk[j] = x(kL-j)) feeds
//   - the reconfigurable filter, whose coefficients come from the coefficient
//     ROMs and are chosen by filt_sel, and
//   - the fixed-coefficient MCM filter, built for filter FIXED_ID of the same
//     coefficient set.
// Each gives a block of L outputs, y[l] = y(kL-l), one cycle after its input
// block; out_valid marks both. With filt_sel = FIXED_ID the two outputs are
// equal, which is a useful cross-check. Placing both on one input stream is
// this design's choice; defaults L = 4 follow the design, N = 16, 8-bit
// samples and coefficients and four stored filters are this design's own.
module bfir_top #(
  parameter int unsigned L        = 4,
  parameter int unsigned N        = 16,
  parameter int unsigned WX       = 8,
  parameter int unsigned WH       = 8,
  parameter int unsigned NFILT    = 4,
  parameter int unsigned FIXED_ID = 0,
  localparam int unsigned WY      = WX + WH + $clog2(N),
  localparam int unsigned WS      = (NFILT > 1) ? $clog2(NFILT) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [WX-1:0] x_blk   [L],
  input  logic [WS-1:0]        filt_sel,
  output logic signed [WY-1:0] y_rcfg  [L],
  output logic signed [WY-1:0] y_fixed [L],
  output logic                 out_valid
);

  logic rcfg_valid;
  logic fixed_valid;

  bfir_reconfig #(.L(L), .N(N), .WX(WX), .WH(WH), .NFILT(NFILT)) u_rcfg (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x_blk     (x_blk),
    .filt_sel  (filt_sel),
    .y_blk     (y_rcfg),
    .out_valid (rcfg_valid)
  );

  bfir_fixed #(.L(L), .N(N), .WX(WX), .WH(WH), .FILT_ID(FIXED_ID)) u_fixed (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x_blk     (x_blk),
    .y_blk     (y_fixed),
    .out_valid (fixed_valid)
  );

  assign out_valid = rcfg_valid & fixed_valid;

endmodule
