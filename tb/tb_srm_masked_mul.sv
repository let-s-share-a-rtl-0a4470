// tb_srm_masked_mul: drives three multipliers (GF(2^4) and GF(2^2) with four
// shares, GF(2^4) with five shares) with random shares, random linear terms
// and random refresh words every clock, and checks one clock later that the
// value shares and the tag shares of z recombine to the products of the
// recombined inputs (plus the linear term). The reference multiplies through
// the embedding of the subfield into the AES field. It also checks the number
// of random words per multiplier (13 and 16, as in the randomness table) and
// that the output shares are refreshed (not equal to the unrefreshed sums).
module tb_srm_masked_mul;
  import tb_srm_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int refreshed = 0;

  // four shares, W = 4
  logic [3:0][3:0]  a4, b4, l4, z4;
  logic [12:0][3:0] r4;
  srm_masked_mul #(.W(4), .SDEP(2)) u4 (.clk(clk), .a(a4), .b(b4), .lin(l4), .rnd(r4), .z(z4));
  // four shares, W = 2
  logic [3:0][1:0]  a2, b2, l2, z2;
  logic [12:0][1:0] r2;
  srm_masked_mul #(.W(2), .SDEP(2)) u2 (.clk(clk), .a(a2), .b(b2), .lin(l2), .rnd(r2), .z(z2));
  // five shares, W = 4
  logic [4:0][3:0]  a5, b5, l5, z5;
  logic [15:0][3:0] r5;
  srm_masked_mul #(.W(4), .SDEP(1)) u5 (.clk(clk), .a(a5), .b(b5), .lin(l5), .rnd(r5), .z(z5));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [3:0] got, logic [3:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    logic [3:0] va, vb, vl, ta, tb_, tl;
    logic [3:0] ev4, et4, ev5, et5;
    logic [1:0] ev2, et2;
    checks++;
    if ($bits(r4) / 4 != 13 || $bits(r5) / 4 != 16) failures++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a4 = 16'($urandom); b4 = 16'($urandom); l4 = 16'($urandom); r4 = 52'({$urandom, $urandom});
      a2 = 8'($urandom);  b2 = 8'($urandom);  l2 = 8'($urandom);  r2 = 26'($urandom);
      a5 = 20'($urandom); b5 = 20'($urandom); l5 = 20'($urandom); r5 = 64'({$urandom, $urandom});
      if (n % 7 == 0) r4 = '0;
      // four shares: value 0,1,2 ; tag 1,2,3
      va = a4[0]^a4[1]^a4[2]; vb = b4[0]^b4[1]^b4[2]; vl = l4[0]^l4[1]^l4[2];
      ta = a4[1]^a4[2]^a4[3]; tb_ = b4[1]^b4[2]^b4[3]; tl = l4[1]^l4[2]^l4[3];
      ev4 = mul16(va, vb) ^ vl; et4 = mul16(ta, tb_) ^ tl;
      ev2 = mul4(a2[0]^a2[1]^a2[2], b2[0]^b2[1]^b2[2]) ^ l2[0]^l2[1]^l2[2];
      et2 = mul4(a2[1]^a2[2]^a2[3], b2[1]^b2[2]^b2[3]) ^ l2[1]^l2[2]^l2[3];
      // five shares: value 0,1,2 ; tag 2,3,4
      ev5 = mul16(a5[0]^a5[1]^a5[2], b5[0]^b5[1]^b5[2]) ^ l5[0]^l5[1]^l5[2];
      et5 = mul16(a5[2]^a5[3]^a5[4], b5[2]^b5[3]^b5[4]) ^ l5[2]^l5[3]^l5[4];
      @(posedge clk); #1;
      chk("w4 value", z4[0]^z4[1]^z4[2], ev4);
      chk("w4 tag",   z4[1]^z4[2]^z4[3], et4);
      chk("w2 value", {2'b0, z2[0]^z2[1]^z2[2]}, {2'b0, ev2});
      chk("w2 tag",   {2'b0, z2[1]^z2[2]^z2[3]}, {2'b0, et2});
      chk("s5 value", z5[0]^z5[1]^z5[2], ev5);
      chk("s5 tag",   z5[2]^z5[3]^z5[4], et5);
      if (n % 7 != 0 && z4[0] != (mul16(a4[0], b4[0]) ^ mul16(a4[0], b4[1]) ^ mul16(a4[0], b4[2])
                                 ^ mul16(a4[1], b4[0]) ^ mul16(a4[2], b4[0]) ^ l4[0]))
        refreshed++;
    end
    // with random refresh words share 0 must differ from its unrefreshed value most of the time
    checks++;
    if (refreshed < 1000) begin
      failures++;
      $display("FAIL refresh seen only %0d times", refreshed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
