// tb_srm_tag_matrix: for random tag keys alpha and bytes x, applies the
// returned matrix and constant to t = (alpha*x)^-1 and checks that the result
// is the tag alpha*S(x) of the S-box output, S computed as x^254 plus affine.
// Covers alpha = 0 and alpha = 1 and x = 0.
module tb_srm_tag_matrix;
  import tb_srm_ref_pkg::*;
  logic [7:0] alpha, c_tag;
  logic [7:0][7:0] m_tag;
  int checks = 0, failures = 0;

  srm_tag_matrix dut (.alpha(alpha), .m_tag(m_tag), .c_tag(c_tag));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, t, got;
    for (int n = 0; n < 300; n++) begin
      alpha = (n == 0) ? 8'h00 : (n == 1) ? 8'h01 : 8'($urandom);
      #1;
      for (int m = 0; m < 8; m++) begin
        x = (m == 0) ? 8'h00 : 8'($urandom);
        t = gpow(gm(alpha, x), 254);
        for (int r = 0; r < 8; r++) got[r] = ^(m_tag[r] & t);
        got ^= c_tag;
        checks++;
        if (got != gm(alpha, sbox(x))) begin
          failures++;
          $display("FAIL alpha=%02x x=%02x got %02x want %02x", alpha, x, got, gm(alpha, sbox(x)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
