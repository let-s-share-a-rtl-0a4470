// srm_refresh: share refresh gadget for the share-reduced sharing.
//
// Re-randomises an NS-share sharing without changing what the value shares
// (0..2) and the tag shares (3-SDEP..5-SDEP) recombine to. Random words are
// added in pairs so that each pair cancels in both sums:
//   four shares (SDEP=2):  z0^R0^R1, z1^R1^R2, z2^R2^R0, z3^R0^R1
//   five shares (SDEP=1):  z0^R0^R1, z1^R1^R2, z2^R2^R0, z3^R0^R3, z4^R3^R2
// so it needs NS-1 random bytes. The equations are the document's; the gadget
// is combinational here, and in srm_top it sits in front of the S-box so that
// the Stage 1 register follows it. Where else it is applied is not stated.
module srm_refresh #(
  parameter int SDEP = 2,
  localparam int NS  = srm_pkg::nshares(SDEP)
) (
  input  srm_pkg::byte_t [NS-1:0]  x,
  input  srm_pkg::byte_t [NS-2:0]  rnd,
  output srm_pkg::byte_t [NS-1:0]  z
);
  always_comb begin
    z[0] = x[0] ^ rnd[0] ^ rnd[1];
    z[1] = x[1] ^ rnd[1] ^ rnd[2];
    z[2] = x[2] ^ rnd[2] ^ rnd[0];
    if (SDEP == 2) begin
      z[3] = x[3] ^ rnd[0] ^ rnd[1];
    end else begin
      z[3] = x[3] ^ rnd[0] ^ rnd[NS-2];
      z[NS-1] = x[NS-1] ^ rnd[NS-2] ^ rnd[2];
    end
  end

  initial assert (SDEP == 1 || SDEP == 2) else $error("srm_refresh: SDEP must be 1 or 2");
endmodule
