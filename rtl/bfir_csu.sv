// bfir_csu: coefficient storage unit (CSU) of the reconfigurable filter.
//
// Holds the N coefficients of each of NFILT filters as N small ROMs, one per
// tap, each with NFILT entries, so that all N coefficients of the selected
// filter are read in one clock cycle. The read is registered: coef holds the
// coefficients of the filter that sel named at the previous clock edge; a sel beyond the last
// filter leaves the register unchanged. The
// ROM contents come from bfir_pkg::rom_coef() (a placeholder formula, see the
// package); NFILT and the registered read are this design's choices. Reset
// clears the output register to zero.
module bfir_csu #(
  parameter int unsigned N     = 16,
  parameter int unsigned WH    = 8,
  parameter int unsigned NFILT = 4,
  localparam int unsigned WS   = (NFILT > 1) ? $clog2(NFILT) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [WS-1:0]        sel,
  output logic signed [WH-1:0] coef [N]
);

  for (genvar i = 0; i < N; i++) begin : g_tap
    logic signed [WH-1:0] lut [NFILT];

    for (genvar f = 0; f < NFILT; f++) begin : g_word
      assign lut[f] = WH'(bfir_pkg::rom_coef(f, i, WH));
    end

    always_ff @(posedge clk) begin
      if (rst)                      coef[i] <= '0;
      else if (int'(sel) < NFILT)   coef[i] <= lut[sel];
    end
  end

endmodule
