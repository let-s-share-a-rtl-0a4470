// srm_sbox: share-reduced masked AES S-box, value and tag computed together.
//
// Masks and Macs protects AES with a value circuit on x and a tag circuit on
// alpha*x, each masked with three shares. Here the two circuits are merged:
// SDEP shares are common to the value sharing and the tag sharing, so the
// S-box carries NS = 6-SDEP shares instead of six (SDEP=2: four shares,
// SDEP=1: five shares). Input share layout (srm_pkg): value shares 0..2 XOR to
// x, tag shares 3-SDEP..5-SDEP XOR to alpha*x. The outputs have the same
// layout and XOR to S(x) and alpha*S(x).
//
// The inversion is Canright's normal-basis tower inversion in the six-stage
// pipeline of De Cnudde et al.; every nonlinear operation is an
// srm_masked_mul whose cross products are refreshed and registered:
//   Stage 1  basis change P2T, share-wise                       (srm_linear_map)
//   Stage 2  lambda = a*b + (a+b)^2*NU over GF(2^4)             (Mult + Sq.Sc.)
//   Stage 3  theta  = c*d + (c+d)^2*N over GF(2^2), lambda={c,d}
//   Stage 4  theta^-1 (bit swap, share-wise), then theta^-1*d and theta^-1*c
//            give lambda^-1
//   Stage 5  lambda^-1*b and lambda^-1*a give the inverse {.,.} of {a,b}
//   Stage 6  basis change back and affine maps                  (srm_out_map)
// Operands needed later (the input byte, lambda) travel in pipeline registers.
//
// Interface: one byte per clock, no stalls. Latency 6 clocks from in_valid to
// out_valid. rnd supplies RAND_BITS = 18*(17-SDEP^2) fresh random bits every
// clock (234 for four shares, 288 for five), split as Stage 2 | Stage 3 |
// Stage 4 (two multipliers) | Stage 5 (two multipliers), Stage 2 in the low
// bits. m_tag/c_tag come from srm_tag_matrix and must stay stable while the
// pipeline holds data of the same tag key. Only the valid bits are reset; the
// masked data registers are not.
//
// Follows the document: stage structure, share reduction, cross-product
// reuse, ring refreshing and the recombination in Stage 6. Own choices: tower
// basis constants, product ordering, where the square-and-scale term is added
// (into a product before the register, as the register counts of the document
// imply), and the randomness bus layout.
module srm_sbox #(
  parameter int SDEP = 2,
  localparam int NS  = srm_pkg::nshares(SDEP),
  localparam int NR  = srm_pkg::nrand(SDEP),
  localparam int RAND_BITS = 18 * NR
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  srm_pkg::byte_t [NS-1:0]  in_sh,
  input  logic [RAND_BITS-1:0]     rnd,
  input  logic [7:0][7:0]          m_tag,
  input  srm_pkg::byte_t           c_tag,
  output logic                     out_valid,
  output srm_pkg::byte_t [NS-1:0]  out_sh
);
  import srm_pkg::*;

  // randomness slices
  localparam int R2 = 0;
  localparam int R3 = R2 + 4 * NR;
  localparam int R4A = R3 + 2 * NR;
  localparam int R4B = R4A + 2 * NR;
  localparam int R5A = R4B + 2 * NR;
  localparam int R5B = R5A + 4 * NR;

  // Stage 1
  byte_t [NS-1:0] s1;
  srm_linear_map #(.NS(NS)) u_s1 (.clk(clk), .x(in_sh), .y(s1));

  // Stage 2: lambda over GF(2^4)
  nib_t [NS-1:0] s2a, s2b, s2lin, lam;
  byte_t [NS-1:0] p2;
  always_comb
    for (int k = 0; k < NS; k++) begin
      s2a[k]   = s1[k][7:4];
      s2b[k]   = s1[k][3:0];
      s2lin[k] = gf16_sqsc(s1[k]);
    end
  srm_masked_mul #(.W(4), .SDEP(SDEP)) u_s2 (
    .clk(clk), .a(s2a), .b(s2b), .lin(s2lin), .rnd(rnd[R3-1:R2]), .z(lam));
  always_ff @(posedge clk) p2 <= s1;

  // Stage 3: theta over GF(2^2)
  crumb_t [NS-1:0] s3a, s3b, s3lin, th;
  byte_t [NS-1:0] p3;
  nib_t  [NS-1:0] l3;
  always_comb
    for (int k = 0; k < NS; k++) begin
      s3a[k]   = lam[k][3:2];
      s3b[k]   = lam[k][1:0];
      s3lin[k] = gf4_sqsc(lam[k]);
    end
  srm_masked_mul #(.W(2), .SDEP(SDEP)) u_s3 (
    .clk(clk), .a(s3a), .b(s3b), .lin(s3lin), .rnd(rnd[R4A-1:R3]), .z(th));
  always_ff @(posedge clk) begin
    p3 <= p2;
    l3 <= lam;
  end

  // Stage 4: lambda^-1 = {theta^-1 * d, theta^-1 * c}
  crumb_t [NS-1:0] thi, l3c, l3d, li_hi, li_lo;
  byte_t [NS-1:0] p4;
  always_comb
    for (int k = 0; k < NS; k++) begin
      thi[k] = gf4_sq(th[k]);          // inversion in GF(2^2)
      l3c[k] = l3[k][3:2];
      l3d[k] = l3[k][1:0];
    end
  srm_masked_mul #(.W(2), .SDEP(SDEP)) u_s4a (
    .clk(clk), .a(thi), .b(l3d), .lin('0), .rnd(rnd[R4B-1:R4A]), .z(li_hi));
  srm_masked_mul #(.W(2), .SDEP(SDEP)) u_s4b (
    .clk(clk), .a(thi), .b(l3c), .lin('0), .rnd(rnd[R5A-1:R4B]), .z(li_lo));
  always_ff @(posedge clk) p4 <= p3;

  // Stage 5: x^-1 = {lambda^-1 * b, lambda^-1 * a}
  nib_t [NS-1:0] li, p4a, p4b, inv_hi, inv_lo;
  always_comb
    for (int k = 0; k < NS; k++) begin
      li[k]  = {li_hi[k], li_lo[k]};
      p4a[k] = p4[k][7:4];
      p4b[k] = p4[k][3:0];
    end
  srm_masked_mul #(.W(4), .SDEP(SDEP)) u_s5a (
    .clk(clk), .a(li), .b(p4b), .lin('0), .rnd(rnd[R5B-1:R5A]), .z(inv_hi));
  srm_masked_mul #(.W(4), .SDEP(SDEP)) u_s5b (
    .clk(clk), .a(li), .b(p4a), .lin('0), .rnd(rnd[RAND_BITS-1:R5B]), .z(inv_lo));

  // Stage 6
  byte_t [NS-1:0] inv;
  always_comb
    for (int k = 0; k < NS; k++) inv[k] = {inv_hi[k], inv_lo[k]};
  srm_out_map #(.SDEP(SDEP)) u_s6 (
    .clk(clk), .s(inv), .m_tag(m_tag), .c_tag(c_tag), .z(out_sh));

  // valid pipeline
  logic [5:0] vld;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= {vld[4:0], in_valid};
  assign out_valid = vld[5];
endmodule
