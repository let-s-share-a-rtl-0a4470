// srm_top: share-reduced M&M S-box with its tag key logic and fault check.
//
// The incoming sharing is first re-randomised by srm_refresh. The masked
// S-box (srm_sbox) processes value and tag together in
// NS = 6-SDEP shares. srm_tag_matrix derives the tag affine matrix from the
// tag key alpha. At the output, the value shares and the tag shares of each
// S-box result are XORed together (the unmasking that a protected AES does at
// the end of the encryption) and passed to srm_match_check, which collects 16
// bytes, checks tau = alpha*c for every byte and releases the block or zeros.
// The S-box shares are also brought out directly.
//
// The arrangement of value path, tag path and check is that of the M&M scheme
// (value and tag circuits in parallel, a check at the end); wiring the S-box
// output straight into the check, one byte per clock, is this design's own
// arrangement, since the document treats the S-box in isolation.
//
// Interface: one shared byte per clock on in_sh with in_valid; sbox_valid and
// sbox_sh follow 6 clocks later; blk_valid, blk and fault one clock after the
// 16th S-box output. rnd needs RAND_BITS fresh bits every clock for the S-box
// and rnd_ref NS-1 fresh bytes for the input refresh.
module srm_top #(
  parameter int SDEP = 2,
  localparam int NS  = srm_pkg::nshares(SDEP),
  localparam int RAND_BITS = 18 * srm_pkg::nrand(SDEP)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  srm_pkg::byte_t [NS-1:0]  in_sh,
  input  logic [RAND_BITS-1:0]     rnd,
  input  srm_pkg::byte_t [NS-2:0]  rnd_ref,
  input  srm_pkg::byte_t           alpha,
  output logic                     sbox_valid,
  output srm_pkg::byte_t [NS-1:0]  sbox_sh,
  output logic                     blk_valid,
  output logic [127:0]             blk,
  output logic                     fault
);
  import srm_pkg::*;

  localparam int TS = tag_start(SDEP);

  logic [7:0][7:0] m_tag;
  byte_t           c_tag;
  srm_tag_matrix u_tagm (.alpha(alpha), .m_tag(m_tag), .c_tag(c_tag));

  byte_t [NS-1:0] ref_sh;
  srm_refresh #(.SDEP(SDEP)) u_ref (.x(in_sh), .rnd(rnd_ref), .z(ref_sh));

  srm_sbox #(.SDEP(SDEP)) u_sbox (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sh(ref_sh), .rnd(rnd),
    .m_tag(m_tag), .c_tag(c_tag), .out_valid(sbox_valid), .out_sh(sbox_sh));

  byte_t c_val, c_tagv;
  always_comb begin
    c_val  = sbox_sh[0] ^ sbox_sh[1] ^ sbox_sh[2];
    c_tagv = sbox_sh[TS] ^ sbox_sh[TS+1] ^ sbox_sh[TS+2];
  end

  srm_match_check #(.NBYTES(16)) u_chk (
    .clk(clk), .rst_n(rst_n), .in_valid(sbox_valid), .c_in(c_val),
    .tag_in(c_tagv), .alpha(alpha), .out_valid(blk_valid), .blk(blk), .fault(fault));
endmodule
