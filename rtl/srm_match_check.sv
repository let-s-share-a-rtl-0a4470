// srm_match_check: fault check on a 16-byte block ("Match check").
//
// M&M detects a fault by testing that the value output c and the tag output
// tau still satisfy tau = alpha*c. The check runs one byte per clock, 16 times
// per block, instead of one 128-bit multiplication: for byte i it forms
// z_i = alpha*c_i xor tau_i and ORs it into an accumulator z. After the last
// byte a delta function on z decides: if z = 0 the buffered block is released,
// otherwise every output bit is forced to 0 and fault is raised. No random
// output is produced, so a tag key restricted away from alpha = 1 causes no
// output bias.
//
// This implementation is unshared: c, tau and alpha arrive as plain bytes and
// the OR-accumulator is an ordinary register. The document keeps these in
// shared form but does not give that circuit.
//
// Interface: in_valid with c_in/tag_in presents one byte, the first byte of a
// block lands in blk[127:120]. One clock after the 16th byte, out_valid pulses
// for one clock with blk and fault. Bytes may come with gaps. alpha must stay
// constant during a block.
module srm_match_check #(
  parameter int NBYTES = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  srm_pkg::byte_t            c_in,
  input  srm_pkg::byte_t            tag_in,
  input  srm_pkg::byte_t            alpha,
  output logic                      out_valid,
  output logic [8*NBYTES-1:0]       blk,
  output logic                      fault
);
  import srm_pkg::*;

  localparam int CW = $clog2(NBYTES);

  logic [CW-1:0]        cnt;
  byte_t                acc;
  logic [8*NBYTES-9:0]  buf_q;     // the first NBYTES-1 bytes
  byte_t                zi, acc_n;
  logic [8*NBYTES-1:0]  buf_n;

  assign zi    = gf256_mul(alpha, c_in) ^ tag_in;   // just compare
  assign acc_n = acc | zi;                          // then accumulate
  assign buf_n = {buf_q, c_in};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      buf_q     <= '0;
      out_valid <= 1'b0;
      blk       <= '0;
      fault     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(NBYTES - 1)) begin
          cnt       <= '0;
          acc       <= '0;
          out_valid <= 1'b1;
          fault     <= (acc_n != 8'h00);
          blk       <= (acc_n == 8'h00) ? buf_n : '0;   // delta function
        end else begin
          cnt   <= cnt + 1'b1;
          acc   <= acc_n;
        end
        buf_q <= buf_n[8*NBYTES-9:0];
      end
    end
endmodule
