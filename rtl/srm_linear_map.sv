// srm_linear_map: Stage 1 of the S-box pipeline ("LinearMap").
//
// Each of the NS input shares is mapped from the AES polynomial basis into the
// tower-field normal basis with the constant matrix srm_pkg::P2T and
// registered. The map is a field isomorphism, hence GF(2)-linear, so it can be
// applied to every share on its own and a share common to the value and the
// tag sharing is mapped once. The matrix is this design's choice of tower
// basis (see srm_pkg); the document gives only the function.
//
// Timing: one register stage, no enable; y follows x one clock later.
module srm_linear_map #(
  parameter int NS = 4
) (
  input  logic                       clk,
  input  srm_pkg::byte_t [NS-1:0]    x,
  output srm_pkg::byte_t [NS-1:0]    y
);
  import srm_pkg::*;

  always_ff @(posedge clk)
    for (int k = 0; k < NS; k++) y[k] <= mat8(P2T, x[k]);
endmodule
