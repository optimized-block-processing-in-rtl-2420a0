// bfir_ipu: inner product unit (IPU).
//
// Multiplies the L x L input matrix S_k^0 by one short weight vector c_m: the
// (l+1)th of its L inner product cells takes row l of S_k^0 and gives the
// partial output r(kL-l). The L results form the partial-output block r_k^m.
// Purely combinational, as in the structure of the (m+1)th IPU.
module bfir_ipu #(
  parameter int unsigned L  = 4,
  parameter int unsigned WX = 8,
  parameter int unsigned WH = 8,
  localparam int unsigned WR = WX + WH + $clog2(L)
) (
  input  logic signed [WX-1:0] s_rows [L][L],
  input  logic signed [WH-1:0] coef   [L],
  output logic signed [WR-1:0] r_blk  [L]
);

  for (genvar l = 0; l < L; l++) begin : g_ipc
    bfir_ipc #(.L(L), .WX(WX), .WH(WH)) u_ipc (
      .row  (s_rows[l]),
      .coef (coef),
      .r    (r_blk[l])
    );
  end

endmodule
