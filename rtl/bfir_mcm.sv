// bfir_mcm: multiple constant multiplication (MCM) unit.
//
// Multiplies one input sample x by each of the N fixed coefficients of filter
// FILT_ID (from bfir_pkg::rom_coef) with shifts and adds instead of general
// multipliers. Each constant is recoded at elaboration into canonical signed
// digits; pairs of nonzero digits two places apart are then taken from two
// subexpressions computed once for all constants, 3x = 2x + x and
// 5x = 4x + x (horizontal subexpression sharing), and the product is the sum
// of +/- shifted copies of x, 3x and 5x (bfir_pkg::mcm_terms). Sharing of
// subexpressions across constants follows the published structure;
// the particular choice of 3x and 5x as the only shared terms is this
// design's own, simpler than a full common-subexpression search.
// Purely combinational; products are WX + WH bits and exact. The low bits of
// the product of a constant divisible by 2^s are constant zero, as expected.
module bfir_mcm #(
  parameter int unsigned N       = 16,
  parameter int unsigned WX      = 8,
  parameter int unsigned WH      = 8,
  parameter int unsigned FILT_ID = 0,
  localparam int unsigned WP     = WX + WH
) (
  input  logic signed [WX-1:0] x,
  output logic signed [WP-1:0] p [N]
);

  // Shared subexpressions, one adder each for all N constants.
  logic signed [WP:0] x1;
  logic signed [WP:0] x3;
  logic signed [WP:0] x5;

  assign x1 = (WP+1)'(x);
  assign x3 = (x1 <<< 1) + x1;
  assign x5 = (x1 <<< 2) + x1;

  for (genvar i = 0; i < N; i++) begin : g_const
    localparam int C = bfir_pkg::rom_coef(int'(FILT_ID), i, int'(WH));
    localparam longint unsigned P1 = bfir_pkg::mcm_terms(C, 0);
    localparam longint unsigned N1 = bfir_pkg::mcm_terms(C, 1);
    localparam longint unsigned P3 = bfir_pkg::mcm_terms(C, 2);
    localparam longint unsigned N3 = bfir_pkg::mcm_terms(C, 3);
    localparam longint unsigned P5 = bfir_pkg::mcm_terms(C, 4);
    localparam longint unsigned N5 = bfir_pkg::mcm_terms(C, 5);

    logic signed [WP:0] sum;

    always_comb begin
      sum = '0;
      for (int b = 0; b <= int'(WH); b++) begin
        if (P1[b]) sum = sum + (x1 <<< b);
        if (N1[b]) sum = sum - (x1 <<< b);
        if (P3[b]) sum = sum + (x3 <<< b);
        if (N3[b]) sum = sum - (x3 <<< b);
        if (P5[b]) sum = sum + (x5 <<< b);
        if (N5[b]) sum = sum - (x5 <<< b);
      end
      p[i] = sum[WP-1:0];
    end
  end

endmodule
