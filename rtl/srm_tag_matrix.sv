// srm_tag_matrix: affine map of the tag circuit for tag key alpha.
//
// The tag of S(x) = L(x^-1) + 0x63 is alpha*S(x). The inversion in the tag
// circuit delivers t = (alpha*x)^-1, so alpha*L(x^-1) = alpha*L(alpha*t), a
// GF(2)-linear function of t. Its matrix M_tag has as column k the byte
// alpha * L(2^k * alpha) (all products in the AES field), and the constant is
// c_tag = alpha * 0x63. Folding the extra factor alpha^2 into M_tag this way is
// the latency-optimised form given by the document; it removes a
// multiplication by alpha^2 after the inversion.
//
// The module is combinational and works on an unshared alpha; m_tag is
// returned as rows, row r selecting the bits of t XORed into output bit r.
// alpha is the per-encryption tag key and is expected to be stable while the
// S-box pipeline holds data.
module srm_tag_matrix (
  input  srm_pkg::byte_t              alpha,
  output logic [7:0][7:0]             m_tag,
  output srm_pkg::byte_t              c_tag
);
  import srm_pkg::*;

  always_comb begin
    byte_t col;
    m_tag = '0;
    for (int k = 0; k < 8; k++) begin
      col = gf256_mul(alpha, aes_lin(gf256_mul(byte_t'(1 << k), alpha)));
      for (int r = 0; r < 8; r++) m_tag[r][k] = col[r];
    end
    c_tag = gf256_mul(alpha, AES_C);
  end
endmodule
