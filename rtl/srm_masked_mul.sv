// srm_masked_mul: one share-reduced masked multiplication over GF(2^W)
// (W = 4 for GF(2^4), W = 2 for GF(2^2)), the "Mult." boxes of the pipeline.
//
// Inputs a and b are NS = 6-SDEP shares each, laid out as in srm_pkg: shares
// 0..2 are the value sharing, shares 3-SDEP..5-SDEP the tag sharing, and the
// shares in between belong to both. The module forms the NPROD = 18-SDEP^2
// cross products a_i*b_j needed by the value and the tag multiplication,
// computing the products shared by both only once. Each product is refreshed
// with two words of the ring of fresh randomness (srm_pkg header) and then
// registered individually; after the register the products are XORed into the
// NS output shares. An optional linear term lin[i] (the square-and-scale term
// of Stages 2 and 3) is added share-wise into the first product of each output
// share before the register, so it costs no extra register bits.
//
// Result: the value shares of z sum to (value of a)*(value of b) (+ value of
// lin) and the tag shares of z sum to (tag of a)*(tag of b) (+ tag of lin).
//
// Timing: one register stage; z is valid one clock after a, b, lin and rnd.
// Randomness: NRAND = 17-SDEP^2 W-bit words per clock, rnd[k] is R_k.
// The per-product register and the ring refreshing follow the document's
// four-share equations; the product order and the generalisation to SDEP=1
// are this design's.
module srm_masked_mul #(
  parameter int W    = 4,
  parameter int SDEP = 2,
  localparam int NS  = srm_pkg::nshares(SDEP),
  localparam int NP  = srm_pkg::nprod(SDEP),
  localparam int NR  = srm_pkg::nrand(SDEP)
) (
  input  logic                  clk,
  input  logic [NS-1:0][W-1:0]  a,
  input  logic [NS-1:0][W-1:0]  b,
  input  logic [NS-1:0][W-1:0]  lin,
  input  logic [NR-1:0][W-1:0]  rnd,
  output logic [NS-1:0][W-1:0]  z
);
  import srm_pkg::*;

  localparam logic [17:0][2:0] OSEL = out_sel(SDEP);

  logic [NP-1:0][W-1:0] t_d, t_q;

  for (genvar p = 0; p < NP; p++) begin : g_prod
    localparam int I  = prod_info(SDEP, p, PI_I);
    localparam int J  = prod_info(SDEP, p, PI_J);
    localparam int O  = prod_info(SDEP, p, PI_O);
    localparam int RA = prod_info(SDEP, p, PI_RA);
    localparam int RB = prod_info(SDEP, p, PI_RB);
    localparam bit FIRST = prod_info(SDEP, p, PI_FIRST) != 0;
    logic [W-1:0] prod;
    if (W == 4) begin : g_gf16
      assign prod = gf16_mul(a[I], b[J]);
    end else begin : g_gf4
      assign prod = gf4_mul(a[I], b[J]);
    end
    if (FIRST) begin : g_lin
      assign t_d[p] = prod ^ rnd[RA] ^ rnd[RB] ^ lin[O];
    end else begin : g_nolin
      assign t_d[p] = prod ^ rnd[RA] ^ rnd[RB];
    end
  end

  always_ff @(posedge clk) t_q <= t_d;

  always_comb begin
    z = '0;
    for (int p = 0; p < NP; p++) z[OSEL[p]] ^= t_q[p];
  end

  initial begin
    assert (W == 2 || W == 4) else $error("srm_masked_mul: W must be 2 or 4");
    assert (SDEP == 1 || SDEP == 2) else $error("srm_masked_mul: SDEP must be 1 or 2");
  end
endmodule
