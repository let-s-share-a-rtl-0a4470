// tb_srm_sbox: streams random bytes, one per clock with occasional idle
// clocks, through the four-share (SDEP=2) and the five-share (SDEP=1) S-box.
// Each byte is freshly shared (value shares XOR to x, tag shares to alpha*x),
// the refresh bus is random every clock and the tag key changes between
// bursts (including alpha = 1; each byte value 0..255 is offered three times). The
// outputs must recombine to S(x) and alpha*S(x), S being x^254 plus the
// affine map, and must appear exactly 6 clocks after the input. The widths of
// the randomness buses must be 234 and 288 bits.
module tb_srm_sbox;
  import tb_srm_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;
  localparam int LAT = 6;

  logic [7:0] alpha, c_tag;
  logic [7:0][7:0] m_tag;
  srm_tag_matrix u_m (.alpha(alpha), .m_tag(m_tag), .c_tag(c_tag));

  logic in_valid, ov4, ov5;
  logic [3:0][7:0] in4, out4;
  logic [4:0][7:0] in5, out5;
  logic [233:0] rnd4;
  logic [287:0] rnd5;
  srm_sbox #(.SDEP(2)) u4 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sh(in4),
    .rnd(rnd4), .m_tag(m_tag), .c_tag(c_tag), .out_valid(ov4), .out_sh(out4));
  srm_sbox #(.SDEP(1)) u5 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sh(in5),
    .rnd(rnd5), .m_tag(m_tag), .c_tag(c_tag), .out_valid(ov5), .out_sh(out5));

  // expected results, indexed by the clock in which the input was applied
  logic [7:0] exp_v [int];
  logic [7:0] exp_t [int];
  int cyc = 0;
  int nout = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ov4 !== ov5) begin checks++; failures++; $display("FAIL valid mismatch"); end
      if (ov4) begin
        checks += 4;
        nout++;
        if (!exp_v.exists(cyc - LAT)) begin
          failures += 4;
          $display("FAIL output at clock %0d without input %0d clocks before", cyc, LAT);
        end else begin
          if ((out4[0]^out4[1]^out4[2]) !== exp_v[cyc-LAT]) begin failures++; $display("FAIL 4sh value c%0d", cyc); end
          if ((out4[1]^out4[2]^out4[3]) !== exp_t[cyc-LAT]) begin failures++; $display("FAIL 4sh tag c%0d", cyc); end
          if ((out5[0]^out5[1]^out5[2]) !== exp_v[cyc-LAT]) begin failures++; $display("FAIL 5sh value c%0d", cyc); end
          if ((out5[2]^out5[3]^out5[4]) !== exp_t[cyc-LAT]) begin failures++; $display("FAIL 5sh tag c%0d", cyc); end
        end
      end
    end
  end

  task automatic drive(logic [7:0] x, bit v);
    logic [7:0] tg;
    @(negedge clk);
    tg = gm(alpha, x);
    in_valid = v;
    in4[1] = 8'($urandom); in4[2] = 8'($urandom);
    in4[0] = x ^ in4[1] ^ in4[2];
    in4[3] = tg ^ in4[1] ^ in4[2];
    in5[1] = 8'($urandom); in5[2] = 8'($urandom); in5[3] = 8'($urandom);
    in5[0] = x ^ in5[1] ^ in5[2];
    in5[4] = tg ^ in5[2] ^ in5[3];
    if (v) begin
      exp_v[cyc] = sbox(x);
      exp_t[cyc] = gm(alpha, sbox(x));
    end
  endtask

  always @(negedge clk) begin
    for (int i = 0; i < 234; i += 32) rnd4[i +: 32] = $urandom;
    for (int i = 0; i < 288; i += 32) rnd5[i +: 32] = $urandom;
  end

  int nin = 0;
  initial begin
    checks++;
    if ($bits(rnd4) != 234 || $bits(rnd5) != 288) failures++;
    rst_n = 1'b0; in_valid = 1'b0; alpha = 8'h00;
    in4 = '0; in5 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int burst = 0; burst < 12; burst++) begin
      alpha = (burst == 1) ? 8'h01 : 8'($urandom);
      for (int n = 0; n < 64; n++) begin
        bit v;
        v = ($urandom % 8) != 0;
        drive(8'(burst * 64 + n), v);
        if (v) nin++;
      end
      drive(8'h00, 1'b0);
      repeat (LAT + 1) drive(8'h00, 1'b0);   // drain before the tag key changes
    end
    repeat (LAT + 2) drive(8'h00, 1'b0);
    checks++;
    if (nout != nin) begin failures++; $display("FAIL %0d inputs, %0d outputs", nin, nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
