// tb_srm_out_map: feeds Stage 6 with random sharings (four and five shares)
// of the tower-basis inverses x^-1 (value) and (alpha*x)^-1 (tag), and checks
// one clock later that the value shares recombine to S(x) and the tag shares
// to alpha*S(x). The tower basis and the S-box come from the reference
// package; the tag matrix comes from srm_tag_matrix.
module tb_srm_out_map;
  import tb_srm_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] alpha, c_tag;
  logic [7:0][7:0] m_tag;
  logic [3:0][7:0] s4, z4;
  logic [4:0][7:0] s5, z5;

  srm_tag_matrix u_m (.alpha(alpha), .m_tag(m_tag), .c_tag(c_tag));
  srm_out_map #(.SDEP(2)) u4 (.clk(clk), .s(s4), .m_tag(m_tag), .c_tag(c_tag), .z(z4));
  srm_out_map #(.SDEP(1)) u5 (.clk(clk), .s(s5), .m_tag(m_tag), .c_tag(c_tag), .z(z5));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [7:0] got, logic [7:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %02x want %02x", what, got, want);
    end
  endtask

  initial begin
    logic [7:0] x, tv, tt, sv, st;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      alpha = (n < 10) ? 8'h01 : 8'($urandom);
      x  = (n % 50 == 0) ? 8'h00 : 8'($urandom);
      tv = p2t(gpow(x, 254));
      tt = p2t(gpow(gm(alpha, x), 254));
      // four shares: x0 r0 r1 y0
      s4[1] = 8'($urandom); s4[2] = 8'($urandom);
      s4[0] = tv ^ s4[1] ^ s4[2];
      s4[3] = tt ^ s4[1] ^ s4[2];
      // five shares: x0 x1 r y0 y1
      s5[1] = 8'($urandom); s5[2] = 8'($urandom); s5[3] = 8'($urandom);
      s5[0] = tv ^ s5[1] ^ s5[2];
      s5[4] = tt ^ s5[2] ^ s5[3];
      sv = sbox(x);
      st = gm(alpha, sv);
      @(posedge clk); #1;
      chk("4sh value", z4[0] ^ z4[1] ^ z4[2], sv);
      chk("4sh tag",   z4[1] ^ z4[2] ^ z4[3], st);
      chk("5sh value", z5[0] ^ z5[1] ^ z5[2], sv);
      chk("5sh tag",   z5[2] ^ z5[3] ^ z5[4], st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
