// srm_out_map: Stage 6 of the S-box pipeline ("Inv. LinearMap") with the
// affine transforms of the value and the tag circuit.
//
// Input: the NS shares s of the inversion result in the tower basis. Value
// shares (0..2) sum to x^-1, tag shares (3-SDEP..5-SDEP) sum to (alpha*x)^-1.
// Every share is first converted back to the AES polynomial basis (T2P). The
// value circuit then needs A(v) = L(v) + 0x63 and the tag circuit
// At(v) = M_tag*v + c_tag. A share common to both sharings cannot take both
// maps, so the shares are recombined as the document does for four shares:
//   independent value share 0 : A(s_0) + sum over common h of At(s_h)
//   other independent value   : A(s_k)
//   common share h            : At(s_h) + A(s_h)
//   first independent tag share (index 3): At(s_3) + sum over h of A(s_h)
//   other independent tag     : At(s_k)
// The value shares of z then sum to S(x) and the tag shares to alpha*S(x).
// Each map is linear (plus a constant), so this is done share by share.
//
// Timing: one register stage. m_tag and c_tag come from srm_tag_matrix.
module srm_out_map #(
  parameter int SDEP = 2,
  localparam int NS  = srm_pkg::nshares(SDEP)
) (
  input  logic                     clk,
  input  srm_pkg::byte_t [NS-1:0]  s,
  input  logic [7:0][7:0]          m_tag,
  input  srm_pkg::byte_t           c_tag,
  output srm_pkg::byte_t [NS-1:0]  z
);
  import srm_pkg::*;

  localparam int TS = tag_start(SDEP);

  byte_t [NS-1:0] av, at, z_d;

  always_comb begin
    byte_t sum_at, sum_av;
    sum_at = '0;
    sum_av = '0;
    for (int k = 0; k < NS; k++) begin
      byte_t p;
      p     = mat8(T2P, s[k]);
      av[k] = aes_lin(p) ^ AES_C;
      at[k] = mat8(m_tag, p) ^ c_tag;
    end
    for (int h = TS; h <= 2; h++) begin
      sum_at ^= at[h];
      sum_av ^= av[h];
    end
    for (int k = 0; k < NS; k++) begin
      if (k < TS)       z_d[k] = av[k] ^ ((k == 0) ? sum_at : 8'h00);
      else if (k <= 2)  z_d[k] = at[k] ^ av[k];
      else              z_d[k] = at[k] ^ ((k == 3) ? sum_av : 8'h00);
    end
  end

  always_ff @(posedge clk) z <= z_d;
endmodule
